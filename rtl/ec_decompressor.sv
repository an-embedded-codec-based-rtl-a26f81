// ec_decompressor: one-stage decompressor, 32-bit segment -> 4x2 block.
//
// The data rearrange logic (ec_data_rearrange) rebuilds the eight pixels
// combinationally; a single register stage holds the reconstructed block,
// so a segment presented with in_valid yields out_blk/out_valid one clock
// later, one block per clock (eight pixels per cycle, twice the four pixels
// per cycle that motion compensation consumes). The one-stage, one-cycle
// structure follows the published decompressor. Asynchronous active-low reset.
module ec_decompressor
  import ec_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  logic     in_valid,
  input  segment_t in_seg,
  output logic     out_valid,
  output block_t   out_blk
);
  block_t blk;

  ec_data_rearrange u_rearrange (.seg(in_seg), .blk(blk));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_blk   <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) out_blk <= blk;
    end
  end
endmodule
