// ecc2d_codeword_mem: memory array holding the 32-bit ECC codewords.
//
// 2**ADDR_W words of WORD_W bits. One synchronous write port and one
// synchronous read port: rdata and rvalid appear on the clock edge after re
// is sampled. A third port models a radiation-induced upset: with upset_en
// set, upset_mask is XORed into the word at upset_addr on the clock edge,
// flipping one or several cells of that word at once (a multiple cell
// upset). A normal write to the same address in the same cycle wins.
// A read in the same cycle as a write to the same address returns the old
// word.
//
// Reset (rst_n, asynchronous, active low) clears rvalid and rdata only;
// the array is not reset and must be written before it is read.
// That codewords are held as 32-bit words follows the published design;
// depth, port set, timing and the upset port are this design's choices.
module ecc2d_codeword_mem #(
  parameter int unsigned ADDR_W = 8,
  parameter int unsigned WORD_W = 32
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              we,
  input  logic [ADDR_W-1:0] waddr,
  input  logic [WORD_W-1:0] wdata,
  input  logic              re,
  input  logic [ADDR_W-1:0] raddr,
  input  logic              upset_en,
  input  logic [ADDR_W-1:0] upset_addr,
  input  logic [WORD_W-1:0] upset_mask,
  output logic              rvalid,
  output logic [WORD_W-1:0] rdata
);

  localparam int unsigned DEPTH = 2 ** ADDR_W;

  logic [WORD_W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) begin
      mem[waddr] <= wdata;
    end
    if (upset_en && !(we && waddr == upset_addr)) begin
      mem[upset_addr] <= mem[upset_addr] ^ upset_mask;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rvalid <= 1'b0;
      rdata  <= '0;
    end else begin
      rvalid <= re;
      if (re) rdata <= mem[raddr];
    end
  end

endmodule
