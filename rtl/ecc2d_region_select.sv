// ecc2d_region_select: region selection of the two-dimensional ECC decoder.
//
// Counts the set syndrome bits that belong to the upper half of the data
// matrix (SD1, SD2, SP1, SP2: rows 1-2) and to the lower half (SD3, SD4,
// SP3, SP4: rows 3-4). The half with more set bits is taken to hold the
// error: Region 1 when the upper count is larger, Region 2 when it is
// smaller, Region 3 when both are equal (which includes the error-free word).
//
// Interface: sd_i = {SD1..SD4}, sp_i = {SP1..SP4} -> region_o
// (ecc2d_pkg::region_e).
// Timing: purely combinational (two 4-input bit counts and a comparator).
// The comparison rule follows the published region table; the 2-bit
// encoding of the regions is this design's choice.
module ecc2d_region_select
  import ecc2d_pkg::*;
(
  input  logic [1:4] sd_i,
  input  logic [1:4] sp_i,
  output region_e    region_o
);

  logic [2:0] upper_cnt;
  logic [2:0] lower_cnt;

  always_comb begin
    upper_cnt = 3'(sd_i[1]) + 3'(sd_i[2])
              + 3'(sp_i[1]) + 3'(sp_i[2]);
    lower_cnt = 3'(sd_i[3]) + 3'(sd_i[4])
              + 3'(sp_i[3]) + 3'(sp_i[4]);
    if (upper_cnt > lower_cnt)      region_o = REGION1;
    else if (upper_cnt < lower_cnt) region_o = REGION2;
    else                            region_o = REGION3;
  end

endmodule
