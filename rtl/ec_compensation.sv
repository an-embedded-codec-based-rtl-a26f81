// ec_compensation: rounding of the coded bit field (compressor stage 2, part 2).
//
// Only the bits from the start plane downward are coded, so the bits below
// the coded field are lost. To round to nearest, each pixel's coded field is
// incremented when the first truncated bit (the "significant bit") is 1,
// unless the field is already all ones, so that no carry ever reaches the
// preset planes above the start plane. Two versions are produced, as the
// pattern comparison has two formats:
//   comparison rounding    - 4-bit field, bits [7-sp : 4-sp], significant bit 3-sp
//   no comparison rounding - 3-bit field, bits [7-sp : 5-sp], significant bit 4-sp
// Bits below the field are passed unchanged (the decoder ignores them).
// Purely combinational.
module ec_compensation
  import ec_pkg::*;
(
  input  block_t     blk,
  input  logic [1:0] sp,
  output block_t     cmp_blk,
  output block_t     nocmp_blk
);
  always_comb begin
    for (int i = 0; i < 8; i++) begin
      logic [10:0] ext;          // pixel with three zero guard bits on top
      logic [3:0]  f4;
      logic [2:0]  f3;
      logic        s4, s3;
      logic [3:0]  sh;
      sh  = 4'd4 - 4'(sp);       // position of the 4-bit field's LSB
      ext = {3'b000, blk[i]};
      f4  = 4'(ext >> sh);
      s4  = ext[sh - 4'd1];
      f3  = 3'(ext >> (sh + 4'd1));
      s3  = ext[sh];

      cmp_blk[i] = blk[i];
      if (s4 && f4 != 4'hF) begin
        f4 = f4 + 4'd1;
        cmp_blk[i] = 8'((ext & ~(11'hF << sh)) | (11'(f4) << sh));
      end

      nocmp_blk[i] = blk[i];
      if (s3 && f3 != 3'h7) begin
        f3 = f3 + 3'd1;
        nocmp_blk[i] = 8'((ext & ~(11'h7 << (sh + 4'd1))) | (11'(f3) << (sh + 4'd1)));
      end
    end
  end
endmodule
