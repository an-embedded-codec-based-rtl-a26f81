// ec_data_rearrange: rebuilds a 4x2 block from a 32-bit segment.
//
// For each pixel the bitplanes are rebuilt from the top down:
//   - the sp planes above the start plane take the mode's preset values
//     (B7 = mode[1], B6 = mode[0], B5 = 0);
//   - with decision A, B or C the next four planes are the group patterns
//     named by the four 3-bit indices of the sub-block's coded data;
//   - with "no comparison" the next three planes are the coded data's three
//     raw 4-bit planes;
//   - all planes below are zero (the compressor already rounded the coded
//     field to nearest).
// Within a plane, the sub-block's first pixel is the most significant bit.
// This is the inverse of the published packing; the zero fill of the lost
// planes is this design's choice. Purely combinational.
module ec_data_rearrange
  import ec_pkg::*;
(
  input  segment_t seg,
  output block_t   blk
);
  function automatic sub_t rebuild(input logic [1:0] mode, input logic [1:0] sp,
                                   input decision_e dec, input logic [11:0] coded);
    sub_t   s;
    plane_t pl [8];
    int     top;
    for (int b = 0; b < 8; b++) pl[b] = '0;
    pl[7] = {4{mode[1]}};
    pl[6] = {4{mode[0]}};
    top = 7 - int'(sp);
    // Planes at and below the start plane are overwritten by the coded data.
    for (int b = 0; b < 8; b++) if (b <= top) pl[b] = '0;
    if (dec == DEC_NO_CMP) begin
      for (int k = 0; k < 3; k++) pl[top-k] = coded[11-4*k -: 4];
    end else begin
      for (int k = 0; k < 4; k++) pl[top-k] = pattern(dec, coded[11-3*k -: 3]);
    end
    for (int j = 0; j < 4; j++)
      for (int b = 0; b < 8; b++)
        s[j][b] = pl[b][3-j];
    return s;
  endfunction

  assign blk[3:0] = rebuild(seg.mode, seg.sp, seg.dec_l, seg.coded_l);
  assign blk[7:4] = rebuild(seg.mode, seg.sp, seg.dec_r, seg.coded_r);
endmodule
