// ec_start_plane: selective start plane search (compressor stage 2, part 1).
//
// The bitplane transform turns the eight pixels into eight 8-bit bitplanes
// B7 (MSB) .. B0. Four modes preset the top three planes to fixed values:
// mode m presets B7 to all m[1], B6 to all m[0] and B5 to all zeros, which is
// the published mode table (the look-up table of preset B7/B6 values).
// For every mode the start plane is the number of leading planes, from B7,
// that equal their preset: 0 if B7 differs, 1 if B7 matches and B6 differs,
// 2 if B7 and B6 match and B5 differs, else 3. The mode selector keeps the
// largest start plane; on a tie the lowest mode number wins (this design's
// choice; the decoder rebuilds the same planes whichever tied mode is kept).
// Purely combinational.
module ec_start_plane
  import ec_pkg::*;
(
  input  block_t     blk,
  output logic [1:0] sp,
  output logic [1:0] mode
);
  logic [7:0] bp [8];          // bp[b][i] = bit b of pixel i
  logic [1:0] sp_m [4];

  always_comb begin
    for (int b = 0; b < 8; b++)
      for (int i = 0; i < 8; i++)
        bp[b][i] = blk[i][b];
  end

  // Per-mode start plane against the preset planes.
  always_comb begin
    for (int m = 0; m < 4; m++) begin
      logic [7:0] p7, p6;
      p7 = {8{m[1]}};
      p6 = {8{m[0]}};
      if (bp[7] != p7)      sp_m[m] = 2'd0;
      else if (bp[6] != p6) sp_m[m] = 2'd1;
      else if (bp[5] != '0) sp_m[m] = 2'd2;
      else                  sp_m[m] = 2'd3;
    end
  end

  // Mode selector: maximum start plane, lowest mode on ties.
  always_comb begin
    mode = 2'd0;
    sp   = sp_m[0];
    for (int m = 1; m < 4; m++) begin
      if (sp_m[m] > sp) begin
        sp   = sp_m[m];
        mode = 2'(m);
      end
    end
  end
endmodule
