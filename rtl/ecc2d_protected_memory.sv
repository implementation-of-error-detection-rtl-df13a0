// ecc2d_protected_memory: memory protected by the two-dimensional ECC.
//
// Write path: the 16-bit wr_data is encoded (ecc2d_encoder) into a 32-bit
// codeword of data plus 16 redundant bits and stored at wr_addr.
// Read path: the codeword at rd_addr is read from the array
// (ecc2d_codeword_mem) and decoded (ecc2d_decoder): syndrome calculation,
// region selection and XOR & shift correction give the corrected rd_data,
// together with the selected region and the verification flags.
// The upset port flips chosen bits of a stored codeword, to reproduce the
// single and multiple cell upsets the code is meant to correct.
//
// Timing: a write takes effect on the clock edge that samples wr_en. A read
// returns its result, with rd_valid high, in the cycle after rd_en was
// sampled (one cycle of latency, from the memory's read register; encoder
// and decoder are combinational). Reset: rst_n, asynchronous, active low.
// The encode-store-decode structure follows the published design; the
// memory size, port set, timing and the upset port are this design's own.
module ecc2d_protected_memory
  import ecc2d_pkg::*;
#(
  parameter int unsigned ADDR_W = 8
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              wr_en,
  input  logic [ADDR_W-1:0] wr_addr,
  input  logic [DATA_W-1:0] wr_data,
  input  logic              rd_en,
  input  logic [ADDR_W-1:0] rd_addr,
  input  logic              upset_en,
  input  logic [ADDR_W-1:0] upset_addr,
  input  logic [CW_W-1:0]   upset_mask,
  output logic              rd_valid,
  output logic [DATA_W-1:0] rd_data,
  output region_e           rd_region,
  output logic              rd_err_detected,
  output logic              rd_err_corrected,
  output logic              rd_err_uncorrected
);

  codeword_t wr_cw;
  codeword_t rd_cw;
  red_t      wr_red;
  data_t     dec_data;

  ecc2d_encoder u_encoder (
    .data_i     (data_t'(wr_data)),
    .red_o      (wr_red),
    .codeword_o (wr_cw)
  );

  ecc2d_codeword_mem #(
    .ADDR_W (ADDR_W),
    .WORD_W (CW_W)
  ) u_mem (
    .clk        (clk),
    .rst_n      (rst_n),
    .we         (wr_en),
    .waddr      (wr_addr),
    .wdata      (wr_cw),
    .re         (rd_en),
    .raddr      (rd_addr),
    .upset_en   (upset_en),
    .upset_addr (upset_addr),
    .upset_mask (upset_mask),
    .rvalid     (rd_valid),
    .rdata      (rd_cw)
  );

  ecc2d_decoder u_decoder (
    .codeword_i        (rd_cw),
    .data_o            (dec_data),
    .region_o          (rd_region),
    .err_detected_o    (rd_err_detected),
    .err_corrected_o   (rd_err_corrected),
    .err_uncorrected_o (rd_err_uncorrected)
  );

  assign rd_data = dec_data;

endmodule
