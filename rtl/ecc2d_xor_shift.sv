// ecc2d_xor_shift: "XOR & shift" correction of the two-dimensional ECC.
//
// The group check syndromes locate errors inside a column of the data
// matrix: SCg13 marks a flipped bit of group g in row 1 or row 3, SCg24 one
// in row 2 or row 4. Once the region selection has said which half holds the
// error, the two 4-bit vectors {SCx13..SCw13} and {SCx24..SCw24} are shifted
// onto the two rows of that half (rows 1/2 for Region 1, rows 3/4 for
// Region 2) and XORed into the stored data. In Region 3 nothing is changed.
// Any error pattern confined to one half whose region selection points at
// that half is corrected, whatever its number of bits.
//
// Interface: data_i, sc13_i = {SCx13..SCw13}, sc24_i = {SCx24..SCw24},
// region_i -> data_o (corrected data) and
// flip_o (the mask XORed into the data, zero when nothing was corrected).
// Timing: purely combinational.
// Only the name of this step is published; the mapping of check syndromes
// onto rows, and leaving Region 3 uncorrected, are this design's reading.
module ecc2d_xor_shift
  import ecc2d_pkg::*;
(
  input  data_t      data_i,
  input  logic [1:4] sc13_i,
  input  logic [1:4] sc24_i,
  input  region_e    region_i,
  output data_t      data_o,
  output data_t      flip_o
);

  // Row syndromes after the shift: rows[i] = {X, Y, Z, W} flips of row i.
  logic [1:4] rows [1:4];

  always_comb begin
    for (int unsigned i = 1; i <= 4; i++) rows[i] = '0;
    unique case (region_i)
      REGION1: begin rows[1] = sc13_i; rows[2] = sc24_i; end
      REGION2: begin rows[3] = sc13_i; rows[4] = sc24_i; end
      default: ;
    endcase
    for (int unsigned i = 1; i <= 4; i++) begin
      flip_o.x[i] = rows[i][1];
      flip_o.y[i] = rows[i][2];
      flip_o.z[i] = rows[i][3];
      flip_o.w[i] = rows[i][4];
    end
    data_o = data_i ^ flip_o;
  end

endmodule
