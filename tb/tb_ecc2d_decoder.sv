// tb_ecc2d_decoder: self-checking testbench of the 2D-ECC decoder.
//
// Checks, against a reference decoder written with flat bit indices:
//  - the published example: the stored word DD2D/FFF0 decodes to DD2D;
//  - error-free codewords: data unchanged, Region 3, no flags;
//  - every single-bit error in data and redundancy (data bits must be
//    restored, redundancy errors must leave the data alone);
//  - adjacent double errors inside one half of the matrix (horizontal and
//    vertical), which must be corrected;
//  - random multi-bit error masks, compared with the reference decoder
//    (data, region and the three flags).
// Combinational; sampled 1 time unit after each input change.
module tb_ecc2d_decoder;
  import ecc2d_pkg::*;

  int checks = 0;
  int failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  codeword_t cw;
  data_t     data;
  region_e   region;
  logic      det, corr, uncorr;

  ecc2d_decoder dut (.codeword_i(cw), .data_o(data), .region_o(region),
                     .err_detected_o(det), .err_corrected_o(corr),
                     .err_uncorrected_o(uncorr));

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

  // Reference decoder: returns {flags[2:0] = det,corr,uncorr, region[1:0], data[15:0]}.
  function automatic logic [20:0] ref_dec(input logic [31:0] w);
    logic [15:0] s, flip;
    int up, lo, top_row;
    logic [1:0] r;
    s  = w[15:0] ^ ref_red(w[31:16]);
    up = int'(s[15]) + int'(s[14]) + int'(s[11]) + int'(s[10]);
    lo = int'(s[13]) + int'(s[12]) + int'(s[9]) + int'(s[8]);
    r  = (up > lo) ? 2'd1 : (up < lo) ? 2'd2 : 2'd3;
    flip = '0;
    top_row = (r == 2'd1) ? 0 : 2;
    if (r != 2'd3)
      for (int g = 0; g < 4; g++) begin
        flip[15 - 4*g - top_row]     = s[7 - g];
        flip[15 - 4*g - top_row - 1] = s[3 - g];
      end
    return {(s != 0), (flip != 0), (s != 0) && (r == 2'd3), r, w[31:16] ^ flip};
  endfunction

  task automatic check(input logic [31:0] w, input logic [15:0] exp_data);
    logic [20:0] e;
    e = ref_dec(w);
    cw = codeword_t'(w);
    #1;
    checks++;
    if (data !== data_t'(exp_data) || data !== data_t'(e[15:0]) ||
        region !== region_e'(e[17:16]) || {det, corr, uncorr} !== e[20:18]) begin
      failures++;
      if (failures < 10)
        $display("FAIL cw=%h data=%h region=%0d flags=%b%b%b expected %h/%h %0d %b",
                 w, data, region, det, corr, uncorr, exp_data, e[15:0], e[17:16], e[20:18]);
    end
  endtask

  initial begin
    logic [15:0] d;
    logic [31:0] good, m;
    int n_single = 0, n_double = 0;
    // Published example (inputs of the encoding figure, outputs oa1..od4).
    check({16'hDD2D, 16'hFFF0}, 16'hDD2D);
    for (int n = 0; n < 300; n++) begin
      d = 16'($urandom);
      good = {d, ref_red(d)};
      check(good, d);
      // All single-bit errors: always corrected (data) or harmless (redundancy).
      for (int b = 0; b < 32; b++) begin
        check(good ^ (32'h1 << b), d);
        n_single++;
      end
      // Adjacent double errors inside one half: horizontal in a row ...
      for (int i = 0; i < 4; i++)
        for (int g = 0; g < 3; g++) begin
          m = (32'h1 << (31 - 4*g - i)) | (32'h1 << (31 - 4*(g+1) - i));
          check(good ^ m, d);
          n_double++;
        end
      // ... and vertical within rows 1-2 or rows 3-4 of a group.
      for (int g = 0; g < 4; g++)
        for (int h = 0; h < 2; h++) begin
          m = (32'h3 << (31 - 4*g - 2*h - 1));
          check(good ^ m, d);
          n_double++;
        end
      // Random error masks: reference decoder decides the expected data.
      for (int k = 0; k < 8; k++) begin
        m = $urandom & $urandom;
        check(good ^ m, ref_dec(good ^ m)[15:0]);
      end
    end
    if (n_single == 0 || n_double == 0) failures++;
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
