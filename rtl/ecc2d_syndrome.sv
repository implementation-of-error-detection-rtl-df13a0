// ecc2d_syndrome: syndrome calculation of the two-dimensional ECC decoder.
//
// Recomputes the redundancy from the data half of a stored codeword (with
// an instance of the encoder) and XORs it with the stored redundancy. Each
// set bit of the result marks a diagonal (SD1-SD4), row parity (SP1-SP4) or
// group check (SC13, SC24) equation that no longer holds. An error-free
// codeword gives an all-zero syndrome.
//
// Interface: codeword_i -> syndrome_o, same layout as the redundancy.
// Timing: purely combinational.
// XORing the stored against the recomputed bits follows the published
// scheme; reusing the encoder for the recomputation is this design's choice.
module ecc2d_syndrome
  import ecc2d_pkg::*;
(
  input  codeword_t codeword_i,
  output red_t      syndrome_o
);

  red_t      recomputed;
  codeword_t unused_cw;

  ecc2d_encoder u_recompute (
    .data_i     (codeword_i.data),
    .red_o      (recomputed),
    .codeword_o (unused_cw)
  );

  assign syndrome_o = codeword_i.red ^ recomputed;

endmodule
