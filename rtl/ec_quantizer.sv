// ec_quantizer: one of the four pixel-truncation quantizers.
//
// When the block's max-min difference is below DIFF_LIMIT, every pixel is
// clamped into [LO, HI]: a pixel below LO becomes LO, one above HI becomes HI.
// Otherwise the block passes unchanged (the "no change" type). The four
// instances use LO/HI = 0/63, 64/127, 128/191, 192/255 with DIFF_LIMIT 32, 64,
// 64, 32, the published ranges. Purely combinational.
module ec_quantizer
  import ec_pkg::*;
#(
  parameter int unsigned LO         = 0,
  parameter int unsigned HI         = 63,
  parameter int unsigned DIFF_LIMIT = 32
) (
  input  block_t     blk,
  input  logic [7:0] diff,
  output block_t     q_blk
);
  localparam pixel_t LO_P = pixel_t'(LO);
  localparam pixel_t HI_P = pixel_t'(HI);

  always_comb begin
    for (int i = 0; i < 8; i++) begin
      q_blk[i] = blk[i];
      if (32'(diff) < DIFF_LIMIT) begin
        if (blk[i] < LO_P)      q_blk[i] = LO_P;
        else if (blk[i] > HI_P) q_blk[i] = HI_P;
      end
    end
  end
endmodule
