// ec_data_packer: data packing (compressor stage 2, last part).
//
// The header fields (mode, start plane, decision L/R) are produced
// combinationally in stage 2, while the coded data is already registered in
// the comparison block. The packer registers the header and the valid flag
// on the same clock edge, so that header and coded data leave together, and
// concatenates them into the 32-bit segment
// Mode | Start Plane | Decision L | Decision R | Coded L | Coded R.
// out_seg/out_valid appear one clock after the stage-2 inputs.
// Asynchronous active-low reset.
module ec_data_packer
  import ec_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  input  logic [1:0]  mode,
  input  logic [1:0]  sp,
  input  logic [3:0]  decision,
  input  logic [23:0] coded,
  output logic        out_valid,
  output segment_t    out_seg
);
  logic [7:0] header_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      header_q  <= '0;
    end else begin
      out_valid <= in_valid;
      header_q  <= {mode, sp, decision};
    end
  end

  assign out_seg = segment_t'({header_q, coded});
endmodule
