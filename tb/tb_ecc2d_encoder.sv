// tb_ecc2d_encoder: self-checking testbench of the 2D-ECC encoder.
//
// Checks the published example word (a=1101, b=1101, c=0010, d=1101, which
// encodes to D=1111, P=1111, C13=1111, C24=0000), then all 65536 data words
// against a reference model written with flat bit indices, and checks that
// the codeword output is {data, redundancy}. The encoder is combinational;
// values are sampled 1 time unit after each input change.
module tb_ecc2d_encoder;
  import ecc2d_pkg::*;

  int checks = 0;
  int failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  data_t     data;
  red_t      red;
  codeword_t cw;

  ecc2d_encoder dut (.data_i(data), .red_o(red), .codeword_o(cw));

  // Reference: m[g][i] is bit i (0 = first) of group g (0..3 = X,Y,Z,W).
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

  task automatic check(input logic [15:0] d, input logic [15:0] exp_red);
    data = data_t'(d);
    #1;
    checks++;
    if (red !== red_t'(exp_red) || cw !== codeword_t'({d, exp_red})) begin
      failures++;
      if (failures < 10)
        $display("FAIL data=%h red=%h cw=%h expected red=%h", d, red, cw, exp_red);
    end
  endtask

  initial begin
    // Published example: redundancy bits in printed order di1..cbd24.
    check(16'b1101_1101_0010_1101, 16'b1111_1111_1111_0000);
    for (int v = 0; v < 65536; v++) check(16'(v), ref_red(16'(v)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
