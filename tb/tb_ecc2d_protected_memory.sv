// tb_ecc2d_protected_memory: end-to-end testbench of the ECC-protected memory.
//
// Runs the top at its default size (256 words of 16 data bits). Every
// address is written with a random word and read back with back-to-back
// reads; each result must arrive exactly one cycle after its request. Then
// upsets are injected into stored codewords and each word is read again:
//   - single data-bit upsets in rows 1-2 and in rows 3-4 (Region 1 and
//     Region 2 corrections),
//   - adjacent double upsets inside one half (multiple cell upsets),
//   - a double upset straddling rows 2 and 3 (Region 3: detected, left
//     uncorrected),
//   - a single upset in the redundancy only (data must come back intact),
//   - random upset masks, checked against a reference decoder.
// Each read is compared with a reference encoder/decoder written with flat
// bit indices. The number of times each mechanism occurred is counted and a
// mechanism that never occurred counts as a failure.
module tb_ecc2d_protected_memory;
  import ecc2d_pkg::*;

  localparam int unsigned AW    = 8;
  localparam int unsigned WORDS = 2 ** AW;

  int checks = 0;
  int failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic          rst_n, wr_en, rd_en, upset_en;
  logic [AW-1:0] wr_addr, rd_addr, upset_addr;
  logic [15:0]   wr_data;
  logic [31:0]   upset_mask;
  logic          rd_valid, rd_err_detected, rd_err_corrected, rd_err_uncorrected;
  logic [15:0]   rd_data;
  region_e       rd_region;

  ecc2d_protected_memory dut (
    .clk, .rst_n, .wr_en, .wr_addr, .wr_data, .rd_en, .rd_addr,
    .upset_en, .upset_addr, .upset_mask, .rd_valid, .rd_data, .rd_region,
    .rd_err_detected, .rd_err_corrected, .rd_err_uncorrected);

  logic [15:0] shadow [WORDS];   // data written
  logic [31:0] upsets [WORDS];   // upset mask accumulated since the write

  int n_clean = 0, n_region1 = 0, n_region2 = 0, n_region3 = 0, n_red_only = 0;

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

  // {det, corr, uncorr, region[1:0], data[15:0]}
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

  // Bit of the codeword holding data bit (group g, row i), g/i from 0.
  function automatic logic [31:0] dbit(input int g, input int i);
    return 32'h1 << (31 - 4*g - i);
  endfunction

  task automatic idle();
    wr_en = 0; rd_en = 0; upset_en = 0;
    wr_addr = '0; rd_addr = '0; upset_addr = '0; wr_data = '0; upset_mask = '0;
  endtask

  task automatic fail(input string msg);
    failures++;
    if (failures < 10) $display("FAIL %s", msg);
  endtask

  task automatic write_word(input int a, input logic [15:0] d);
    @(negedge clk); idle(); wr_en = 1; wr_addr = AW'(a); wr_data = d;
    shadow[a] = d; upsets[a] = '0;
  endtask

  task automatic upset(input int a, input logic [31:0] m);
    @(negedge clk); idle(); upset_en = 1; upset_addr = AW'(a); upset_mask = m;
    upsets[a] ^= m;
  endtask

  // Compare the read result for address a; 'must_restore' demands the
  // original data back.
  task automatic check_result(input int a, input bit must_restore);
    logic [20:0] e;
    e = ref_dec({shadow[a], ref_red(shadow[a])} ^ upsets[a]);
    checks++;
    if (!rd_valid) fail($sformatf("no rd_valid for address %0d", a));
    if (rd_data !== e[15:0] || rd_region !== region_e'(e[17:16]) ||
        {rd_err_detected, rd_err_corrected, rd_err_uncorrected} !== e[20:18])
      fail($sformatf("addr %0d upset %h: data %h region %0d flags %b%b%b, expected %h %0d %b",
                     a, upsets[a], rd_data, rd_region, rd_err_detected, rd_err_corrected,
                     rd_err_uncorrected, e[15:0], e[17:16], e[20:18]));
    if (must_restore) begin
      checks++;
      if (rd_data !== shadow[a]) fail($sformatf("addr %0d not restored: %h vs %h", a, rd_data, shadow[a]));
    end
    // Mechanism counters, from what the design reported.
    if (!rd_err_detected)                                    n_clean++;
    else if (rd_err_corrected && rd_region == REGION1)       n_region1++;
    else if (rd_err_corrected && rd_region == REGION2)       n_region2++;
    else if (rd_err_uncorrected)                             n_region3++;
    else if (upsets[a][31:16] == 16'h0 && rd_data == shadow[a]) n_red_only++;
  endtask

  task automatic read_word(input int a, input bit must_restore);
    @(negedge clk); idle(); rd_en = 1; rd_addr = AW'(a);
    @(negedge clk); idle();
    check_result(a, must_restore);
    checks++;
    @(negedge clk);
    if (rd_valid) fail("rd_valid held after a single read");
  endtask

  initial begin
    int a, g, i;
    idle();
    rst_n = 0;
    repeat (3) @(posedge clk);
    checks++;
    if (rd_valid) fail("rd_valid during reset");
    @(negedge clk); rst_n = 1;

    // Published example word at address 0, then random words.
    write_word(0, 16'hDD2D);
    for (a = 1; a < WORDS; a++) write_word(a, 16'($urandom));

    // Back-to-back reads of every word: result one cycle after each request.
    @(negedge clk); idle(); rd_en = 1; rd_addr = 0;
    for (a = 0; a < WORDS; a++) begin
      @(negedge clk);
      check_result(a, 1'b1);
      if (a + 1 < WORDS) rd_addr = AW'(a + 1);
      else idle();
    end

    for (int n = 0; n < 4 * WORDS; n++) begin
      a = $urandom_range(WORDS - 1);
      g = $urandom_range(3);
      i = $urandom_range(3);
      unique case (n % 6)
        0: begin  // single upset, upper half
          upset(a, dbit(g, i % 2)); read_word(a, 1'b1);
        end
        1: begin  // single upset, lower half
          upset(a, dbit(g, 2 + i % 2)); read_word(a, 1'b1);
        end
        2: begin  // vertical double upset inside a half
          upset(a, dbit(g, 2 * (i % 2)) | dbit(g, 2 * (i % 2) + 1)); read_word(a, 1'b1);
        end
        3: begin  // horizontal double upset inside a row
          upset(a, dbit(g % 3, i) | dbit(g % 3 + 1, i)); read_word(a, 1'b1);
        end
        4: begin  // double upset across the two halves: not correctable
          upset(a, dbit(g, 1) | dbit(g, 2)); read_word(a, 1'b0);
          checks++;
          if (!rd_err_uncorrected) fail("straddling upset not flagged");
        end
        default: begin  // redundancy only, then a random mask
          upset(a, 32'h1 << $urandom_range(15)); read_word(a, 1'b1);
          write_word(a, shadow[a]);
          upset(a, $urandom & $urandom & $urandom); read_word(a, 1'b0);
        end
      endcase
      write_word(a, shadow[a]);   // rewrite the word (scrub)
    end

    $display("mechanisms: clean=%0d region1=%0d region2=%0d region3=%0d redundancy_only=%0d",
             n_clean, n_region1, n_region2, n_region3, n_red_only);
    if (n_clean == 0)    fail("no clean read");
    if (n_region1 == 0)  fail("no Region 1 correction");
    if (n_region2 == 0)  fail("no Region 2 correction");
    if (n_region3 == 0)  fail("no Region 3 detection");
    if (n_red_only == 0) fail("no redundancy-only upset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
