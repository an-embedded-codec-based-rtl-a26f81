// ec_pixel_truncation: compressor stage 1.
//
// The block average (sum of the eight pixels shifted right by three) picks
// one of four types, one per quarter of the 8-bit range. The matching
// quantizer clamps all pixels into that quarter when the max-min difference
// is small (below 32 for the outer quarters, below 64 for the inner two);
// otherwise the block passes unchanged. After this step a smooth block has
// identical top bitplanes, which the start-plane search then exploits.
// The average, difference, type selector, four quantizers, output multiplexer
// and register follow the published stage-1 structure; the difference feeds
// the quantizers, so a quantizer whose difference test fails acts as the
// "no change" type.
//
// Timing: the truncated block and its valid flag are registered; they appear
// one clock after in_blk/in_valid. Asynchronous active-low reset clears both.
module ec_pixel_truncation
  import ec_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   in_valid,
  input  block_t in_blk,
  output logic   out_valid,
  output block_t out_blk
);
  logic [10:0] sum;
  pixel_t      avg, pmax, pmin;
  logic [7:0]  diff;
  logic [1:0]  sel;              // type selector: 0..3 = types 1..4
  block_t      q [4];
  block_t      trunc;

  always_comb begin
    sum  = '0;
    pmax = in_blk[0];
    pmin = in_blk[0];
    for (int i = 0; i < 8; i++) begin
      sum = sum + 11'(in_blk[i]);
      if (in_blk[i] > pmax) pmax = in_blk[i];
      if (in_blk[i] < pmin) pmin = in_blk[i];
    end
    avg  = sum[10:3];
    diff = pmax - pmin;
    sel  = avg[7:6];
  end

  ec_quantizer #(.LO(0),   .HI(63),  .DIFF_LIMIT(32)) u_q1 (.blk(in_blk), .diff(diff), .q_blk(q[0]));
  ec_quantizer #(.LO(64),  .HI(127), .DIFF_LIMIT(64)) u_q2 (.blk(in_blk), .diff(diff), .q_blk(q[1]));
  ec_quantizer #(.LO(128), .HI(191), .DIFF_LIMIT(64)) u_q3 (.blk(in_blk), .diff(diff), .q_blk(q[2]));
  ec_quantizer #(.LO(192), .HI(255), .DIFF_LIMIT(32)) u_q4 (.blk(in_blk), .diff(diff), .q_blk(q[3]));

  assign trunc = q[sel];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_blk   <= '0;
    end else begin
      out_valid <= in_valid;
      out_blk   <= trunc;
    end
  end
endmodule
