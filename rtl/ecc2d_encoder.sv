// ecc2d_encoder: encoder of the two-dimensional ECC.
//
// Takes a 16-bit data word, regards it as the four groups X, Y, Z, W of
// ecc2d_pkg and computes the 16 redundant bits by XOR: four diagonal bits
// D1-D4 over the 2x2 sub-blocks, four row parity bits P1-P4 and eight check
// bits Cg13 = g1^g3 and Cg24 = g2^g4 per group. The codeword output is the
// data followed by the redundancy, the 32-bit word that goes to memory.
//
// Interface: data_i (X1 in bit 15) -> red_o (D1 in bit 15), codeword_o.
// Timing: purely combinational, no clock.
// The equations follow the published scheme; the rows 3-4 and Z/W terms,
// which follow the same pattern as the printed ones, reproduce the published
// example (data DD2D hex gives redundancy FFF0 hex).
module ecc2d_encoder
  import ecc2d_pkg::*;
(
  input  data_t     data_i,
  output red_t      red_o,
  output codeword_t codeword_o
);

  always_comb begin
    red_o           = calc_red(data_i);
    codeword_o.data = data_i;
    codeword_o.red  = red_o;
  end

endmodule
