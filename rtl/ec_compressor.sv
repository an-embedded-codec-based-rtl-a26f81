// ec_compressor: two-stage pipelined lossy compressor, 4x2 block -> 32 bits.
//
// Stage 1 (ec_pixel_truncation) clamps outlying pixels of a smooth block so
// its top bitplanes become uniform, and registers the block. Stage 2 finds
// the start plane and mode (ec_start_plane), rounds the coded bit field
// (ec_compensation), codes each 2x2 half against the predefined bitplane
// groups (ec_bitplane_compare) and packs the 32-bit segment
// (ec_data_packer). The split into these two stages, the fixed ratio of 2
// and the 2-cycle latency follow the published architecture.
//
// Interface: in_blk/in_valid may change every clock (one block per cycle);
// out_seg/out_valid follow two clocks later. No back-pressure.
// Asynchronous active-low reset.
module ec_compressor
  import ec_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  logic     in_valid,
  input  block_t   in_blk,
  output logic     out_valid,
  output segment_t out_seg
);
  logic        s1_valid;
  block_t      s1_blk;
  logic [1:0]  sp, mode;
  block_t      cmp_blk, nocmp_blk;
  logic [3:0]  decision;
  logic [23:0] coded;

  ec_pixel_truncation u_trunc (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (in_valid),
    .in_blk   (in_blk),
    .out_valid(s1_valid),
    .out_blk  (s1_blk)
  );

  ec_start_plane u_sp (
    .blk (s1_blk),
    .sp  (sp),
    .mode(mode)
  );

  ec_compensation u_comp (
    .blk      (s1_blk),
    .sp       (sp),
    .cmp_blk  (cmp_blk),
    .nocmp_blk(nocmp_blk)
  );

  ec_bitplane_compare u_cmp (
    .clk      (clk),
    .rst_n    (rst_n),
    .cmp_blk  (cmp_blk),
    .nocmp_blk(nocmp_blk),
    .sp       (sp),
    .decision (decision),
    .coded    (coded)
  );

  ec_data_packer u_pack (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (s1_valid),
    .mode     (mode),
    .sp       (sp),
    .decision (decision),
    .coded    (coded),
    .out_valid(out_valid),
    .out_seg  (out_seg)
  );
endmodule
