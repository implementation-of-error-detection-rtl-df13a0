// tb_ecc2d_xor_shift: self-checking testbench of the XOR & shift correction.
//
// For random data words, every combination of the two check-syndrome
// vectors and every region is applied. Expected: in Region 1 SCg13 flips
// bit 1 and SCg24 bit 2 of group g, in Region 2 bits 3 and 4, in Region 3
// nothing. Combinational; sampled after 1 unit.
module tb_ecc2d_xor_shift;
  import ecc2d_pkg::*;

  int checks = 0;
  int failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  data_t      data, out, flip;
  logic [1:4] sc13, sc24;
  region_e    region;

  ecc2d_xor_shift dut (.data_i(data), .sc13_i(sc13), .sc24_i(sc24),
                       .region_i(region), .data_o(out), .flip_o(flip));

  initial begin
    logic [15:0] d, exp_flip;
    int top_row;
    for (int n = 0; n < 20; n++) begin
      d = 16'($urandom);
      for (int r = 1; r <= 3; r++)
        for (int v = 0; v < 256; v++) begin
          data = data_t'(d);
          {sc13, sc24} = 8'(v);
          region = region_e'(r);
          exp_flip = '0;
          top_row = (r == 1) ? 0 : 2;
          if (r != 3)
            for (int g = 0; g < 4; g++) begin
              exp_flip[15 - 4*g - top_row]     = sc13[g + 1];
              exp_flip[15 - 4*g - top_row - 1] = sc24[g + 1];
            end
          #1;
          checks++;
          if (flip !== data_t'(exp_flip) || out !== data_t'(d ^ exp_flip)) begin
            failures++;
            if (failures < 10)
              $display("FAIL d=%h sc13=%b sc24=%b r=%0d out=%h expected %h", d, sc13, sc24, r, out, d ^ exp_flip);
          end
        end
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
