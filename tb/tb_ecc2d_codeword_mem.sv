// tb_ecc2d_codeword_mem: self-checking testbench of the codeword memory.
//
// Checks against a shadow array: reset clears rvalid; writes followed by
// reads (one cycle read latency, rvalid only after re); a read in the same
// cycle as a write to that address returns the old word; the upset port
// XORs its mask into the stored word; a write to the same address in the
// same cycle as an upset wins. Runs with a 4-bit address (16 words).
module tb_ecc2d_codeword_mem;

  localparam int unsigned AW = 4;
  localparam int unsigned W  = 32;

  int checks = 0;
  int failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic          rst_n, we, re, upset_en, rvalid;
  logic [AW-1:0] waddr, raddr, upset_addr;
  logic [W-1:0]  wdata, upset_mask, rdata;
  logic [W-1:0]  shadow [2**AW];

  ecc2d_codeword_mem #(.ADDR_W(AW), .WORD_W(W)) dut (
    .clk, .rst_n, .we, .waddr, .wdata, .re, .raddr,
    .upset_en, .upset_addr, .upset_mask, .rvalid, .rdata);

  task automatic idle();
    we = 0; re = 0; upset_en = 0;
    waddr = '0; raddr = '0; upset_addr = '0; wdata = '0; upset_mask = '0;
  endtask

  task automatic expect_eq(input logic [W-1:0] got, input logic [W-1:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  task automatic do_write(input logic [AW-1:0] a, input logic [W-1:0] v);
    @(negedge clk); idle(); we = 1; waddr = a; wdata = v;
    @(posedge clk); shadow[a] = v;
  endtask

  task automatic do_read(input logic [AW-1:0] a);
    @(negedge clk); idle(); re = 1; raddr = a;
    @(negedge clk); re = 0;
    expect_eq(W'(rvalid), 1, "rvalid");
    expect_eq(rdata, shadow[a], "rdata");
    @(negedge clk);
    expect_eq(W'(rvalid), 0, "rvalid low after read");
  endtask

  initial begin
    logic [W-1:0] v, mk;
    idle();
    rst_n = 0;
    repeat (2) @(posedge clk);
    expect_eq(W'(rvalid), 0, "rvalid in reset");
    @(negedge clk); rst_n = 1;
    for (int a = 0; a < 2**AW; a++) do_write(AW'(a), $urandom);
    for (int a = 0; a < 2**AW; a++) do_read(AW'(a));
    // Upsets.
    for (int n = 0; n < 20; n++) begin
      mk = $urandom;
      v = AW'($urandom);
      @(negedge clk); idle(); upset_en = 1; upset_addr = AW'(v); upset_mask = mk;
      @(posedge clk); shadow[AW'(v)] ^= mk;
      do_read(AW'(v));
    end
    // Write and upset to the same word in one cycle: the write wins.
    v = $urandom;
    @(negedge clk); idle(); we = 1; waddr = 3; wdata = v;
    upset_en = 1; upset_addr = 3; upset_mask = 32'hFFFF_FFFF;
    @(posedge clk); shadow[3] = v;
    do_read(3);
    // Write and upset to different words in one cycle: both happen.
    v = $urandom;
    @(negedge clk); idle(); we = 1; waddr = 4; wdata = v;
    upset_en = 1; upset_addr = 5; upset_mask = 32'h0000_00F0;
    @(posedge clk); shadow[4] = v; shadow[5] ^= 32'h0000_00F0;
    do_read(4);
    do_read(5);
    // Read during a write to the same address returns the old word.
    v = $urandom;
    @(negedge clk); idle(); we = 1; waddr = 6; wdata = v; re = 1; raddr = 6;
    @(negedge clk); idle();
    expect_eq(rdata, shadow[6], "read-during-write old data");
    shadow[6] = v;
    do_read(6);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
