// ec_addr_map: address multiplexing and mapping for the compressed frame store.
//
// Both clients address the frame store in uncompressed 32-bit words of four
// pixels; the two rows of a 4x2 block sit at the word pair 2k, 2k+1. With the
// compression ratio fixed at two, the block's compressed segment lives at
// word k, so the mapping is a one-bit right shift of the selected address.
// sel_df picks the deblocking-filter (write) address, otherwise the
// motion-compensation (read) address is used. The multiplexer and the
// ADDR_W-bit width follow the published interface; the word-pair layout and
// the shift are this design's choice. Purely combinational.
module ec_addr_map #(
  parameter int unsigned ADDR_W = 20
) (
  input  logic              sel_df,
  input  logic [ADDR_W-1:0] mc_addr,
  input  logic [ADDR_W-1:0] df_addr,
  output logic [ADDR_W-1:0] mem_addr
);
  logic [ADDR_W-1:0] addr;

  assign addr     = sel_df ? df_addr : mc_addr;
  assign mem_addr = addr >> 1;
endmodule
