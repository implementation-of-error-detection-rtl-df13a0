// tb_ecc2d_syndrome: self-checking testbench of the syndrome calculation.
//
// A correctly encoded word must give a zero syndrome. Every single-bit error
// is injected into random codewords and the syndrome compared with the set
// of equations that contain that bit; random multi-bit errors are compared
// with a reference redundancy model. Combinational; sampled after 1 unit.
module tb_ecc2d_syndrome;
  import ecc2d_pkg::*;

  int checks = 0;
  int failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  codeword_t cw;
  red_t      syn;

  ecc2d_syndrome dut (.codeword_i(cw), .syndrome_o(syn));

  function automatic logic [15:0] ref_red(input logic [15:0] d);
    logic m [4][4];
    logic [15:0] r;
    for (int g = 0; g < 4; g++)
      for (int i = 0; i < 4; i++) m[g][i] = d[15 - 4*g - i];
    r[15] = m[0][0] ^ m[1][1] ^ m[2][0] ^ m[3][1];
    r[14] = m[0][1] ^ m[1][0] ^ m[2][1] ^ m[3][0];
    r[13] = m[0][2] ^ m[1][3] ^ m[2][2] ^ m[3][3];
    r[12] = m[0][3] ^ m[1][2] ^ m[2][3] ^ m[3][2];
    for (int i = 0; i < 4; i++) r[11 - i] = m[0][i] ^ m[1][i] ^ m[2][i] ^ m[3][i];
    for (int g = 0; g < 4; g++) begin
      r[7 - g] = m[g][0] ^ m[g][2];
      r[3 - g] = m[g][1] ^ m[g][3];
    end
    return r;
  endfunction

  // Syndrome bits touched by a flip of data bit (group g, row i).
  function automatic logic [15:0] single_syn(input int g, input int i);
    logic [15:0] s = '0;
    // Diagonal: rows 1/2 and 3/4 pair up; X and Z use the "straight" diagonal.
    int half = i / 2;
    int pos  = i % 2;
    int dsel = ((g % 2) == 0) ? pos : 1 - pos;
    s[15 - (2*half + dsel)] = 1'b1;
    s[11 - i] = 1'b1;
    if ((i % 2) == 0) s[7 - g] = 1'b1;
    else              s[3 - g] = 1'b1;
    return s;
  endfunction

  task automatic check(input logic [31:0] word, input logic [15:0] exp);
    cw = codeword_t'(word);
    #1;
    checks++;
    if (syn !== red_t'(exp)) begin
      failures++;
      if (failures < 10) $display("FAIL cw=%h syn=%h expected %h", word, syn, exp);
    end
  endtask

  initial begin
    logic [15:0] d;
    logic [31:0] good, mask;
    for (int n = 0; n < 200; n++) begin
      d = 16'($urandom);
      good = {d, ref_red(d)};
      check(good, 16'h0000);
      for (int g = 0; g < 4; g++)
        for (int i = 0; i < 4; i++) begin
          mask = 32'h1 << (31 - 4*g - i);
          check(good ^ mask, single_syn(g, i));
        end
      for (int b = 0; b < 16; b++) check(good ^ (32'h1 << b), 16'h1 << b);
      mask = $urandom;
      check(good ^ mask, (good[15:0] ^ mask[15:0]) ^ ref_red(d ^ mask[31:16]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
