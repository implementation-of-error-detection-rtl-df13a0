// tb_ecc2d_region_select: self-checking testbench of the region selection.
//
// Drives all 256 combinations of the diagonal and parity syndromes and
// compares the region with the rule: Region 1 when SD1+SD2+SP1+SP2 exceeds
// SD3+SD4+SP3+SP4, Region 2 when it is smaller, Region 3 when equal.
// Combinational; sampled after 1 unit.
module tb_ecc2d_region_select;
  import ecc2d_pkg::*;

  int checks = 0;
  int failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [1:4] sd, sp;
  region_e    region;

  ecc2d_region_select dut (.sd_i(sd), .sp_i(sp), .region_o(region));

  initial begin
    int up, lo;
    logic [1:0] exp;
    for (int v = 0; v < 256; v++) begin
      {sd, sp} = 8'(v);
      up = int'(sd[1]) + int'(sd[2]) + int'(sp[1]) + int'(sp[2]);
      lo = int'(sd[3]) + int'(sd[4]) + int'(sp[3]) + int'(sp[4]);
      exp = (up > lo) ? 2'd1 : (up < lo) ? 2'd2 : 2'd3;
      #1;
      checks++;
      if (region !== region_e'(exp)) begin
        failures++;
        if (failures < 10) $display("FAIL sd=%b sp=%b region=%0d expected %0d", sd, sp, region, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
