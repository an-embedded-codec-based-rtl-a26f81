// ec_bitplane_compare: predefined bitplanes comparison (compressor stage 2, part 3).
//
// Splits the 4x2 block into its left 2x2 sub-block (pixels 0..3) and right
// 2x2 sub-block (pixels 4..7). Both use the block's start plane and are
// coded independently by ec_side_compare (groups A, B, C or no comparison).
// The 4-bit decision {L,R} leaves combinationally; the 24-bit coded data
// {L,R} is held in the stage-2 register, as in the published structure, and
// is valid one clock after the inputs. Asynchronous active-low reset.
module ec_bitplane_compare
  import ec_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  block_t      cmp_blk,
  input  block_t      nocmp_blk,
  input  logic [1:0]  sp,
  output logic [3:0]  decision,
  output logic [23:0] coded
);
  decision_e   dec_l, dec_r;
  logic [11:0] code_l, code_r;

  ec_side_compare u_left (
    .cmp_sub  (sub_t'(cmp_blk[3:0])),
    .nocmp_sub(sub_t'(nocmp_blk[3:0])),
    .sp       (sp),
    .dec      (dec_l),
    .coded    (code_l)
  );

  ec_side_compare u_right (
    .cmp_sub  (sub_t'(cmp_blk[7:4])),
    .nocmp_sub(sub_t'(nocmp_blk[7:4])),
    .sp       (sp),
    .dec      (dec_r),
    .coded    (code_r)
  );

  assign decision = {dec_l, dec_r};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) coded <= '0;
    else        coded <= {code_l, code_r};
  end
endmodule
