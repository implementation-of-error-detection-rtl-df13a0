// ecc2d_decoder: decoder of the two-dimensional ECC.
//
// Chains the three decoding steps on a stored 32-bit codeword: syndrome
// calculation (stored vs. recomputed redundancy), region selection (which
// half of the data matrix holds the error) and the XOR & shift correction,
// giving the corrected 16 data bits. It also reports the verification
// result:
//   err_detected_o    some syndrome bit is set
//   err_corrected_o   at least one data bit was flipped back
//   err_uncorrected_o some syndrome bit is set but Region 3 was selected,
//                     so no data bit was changed
// A word with errors only in its redundancy may raise err_detected_o
// without either of the other two flags; its data is returned unchanged.
//
// Interface: codeword_i -> data_o, region_o, three flags.
// Timing: purely combinational. Two deferred assertions check that Region 3
// never flips data and that nothing is flipped without a syndrome.
// The three steps follow the published decoder; the status flags are this
// design's addition.
module ecc2d_decoder
  import ecc2d_pkg::*;
(
  input  codeword_t codeword_i,
  output data_t     data_o,
  output region_e   region_o,
  output logic      err_detected_o,
  output logic      err_corrected_o,
  output logic      err_uncorrected_o
);

  red_t  syndrome;
  data_t flip;

  ecc2d_syndrome u_syndrome (
    .codeword_i (codeword_i),
    .syndrome_o (syndrome)
  );

  ecc2d_region_select u_region (
    .sd_i     (syndrome.d),
    .sp_i     (syndrome.p),
    .region_o (region_o)
  );

  ecc2d_xor_shift u_correct (
    .data_i     (codeword_i.data),
    .sc13_i     (syndrome.c13),
    .sc24_i     (syndrome.c24),
    .region_i   (region_o),
    .data_o     (data_o),
    .flip_o     (flip)
  );

  assign err_detected_o    = |syndrome;
  assign err_corrected_o   = |flip;
  assign err_uncorrected_o = err_detected_o && (region_o == REGION3);

  // Region 3 never flips data, and nothing is flipped without a syndrome.
  always_comb begin
    assert final (!(err_corrected_o && region_o == REGION3))
      else $error("ecc2d_decoder: data corrected in Region 3");
    assert final (err_detected_o || !err_corrected_o)
      else $error("ecc2d_decoder: data corrected with a zero syndrome");
  end

endmodule
