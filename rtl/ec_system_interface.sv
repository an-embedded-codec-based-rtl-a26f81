// ec_system_interface: embedded compression codec between an H.264 decoder
// core and its 32-bit frame-memory bus.
//
// Write path: the deblocking filter delivers one 4-pixel row (32 bits) per
// clock. A row at an even word address is held as the top row of a 4x2
// block; the row at the next (odd) address completes the block, which goes
// into the two-stage compressor. Two clocks later the 32-bit segment is
// written to memory at the mapped address (half the uncompressed one), so
// frame memory size and write traffic are halved.
//
// Read path: motion compensation requests a 4x2 block by the uncompressed
// address of its top row. The mapped address is read; the returned segment
// passes the one-cycle decompressor and the block is handed back as two
// 4-pixel beats, top row first, on consecutive clocks. Up to RD_DEPTH reads
// may be outstanding; returned segments queue in a RD_DEPTH-entry FIFO, so
// a steady stream of requests yields four pixels every clock. With the FIFO
// empty, the top row leaves one clock after mem_rvalid.
//
// Port sharing: one address port serves both paths through ec_addr_map.
// A compressed segment leaving the compressor cannot wait, so it always wins
// the port; mc_ready is low in that cycle (a stall) and also while RD_DEPTH
// reads are outstanding. The memory is assumed to accept one request per
// clock and to return read data in order (mem_rvalid) any number of clocks
// later.
//
// Pixel order: df_data/mc_rdata carry column c of a row in bits [8c+7:8c].
// The top row holds block pixels 0,1,4,5 and the bottom row 2,3,6,7.
// The 32-bit bus, 20-bit addresses, four pixels per clock on both sides and
// the placement of compressor and decompressor follow the published system
// interface; the handshake, the row pairing, the read FIFO (RD_DEPTH) and the
// arbitration are this design's choices. Asynchronous active-low reset.
module ec_system_interface
  import ec_pkg::*;
#(
  parameter int unsigned ADDR_W = 20,
  parameter int unsigned BUS_W  = 32,
  parameter int unsigned RD_DEPTH = 4
) (
  input  logic              clk,
  input  logic              rst_n,
  // deblocking filter (write) side
  input  logic              df_valid,
  input  logic [ADDR_W-1:0] df_addr,
  input  logic [BUS_W-1:0]  df_data,
  // motion compensation (read) side
  input  logic              mc_req,
  input  logic [ADDR_W-1:0] mc_addr,
  output logic              mc_ready,
  output logic              mc_rvalid,
  output logic [BUS_W-1:0]  mc_rdata,
  // frame memory bus
  output logic              mem_req,
  output logic              mem_we,
  output logic [ADDR_W-1:0] mem_addr,
  output logic [BUS_W-1:0]  mem_wdata,
  input  logic              mem_rvalid,
  input  logic [BUS_W-1:0]  mem_rdata
);
  typedef logic [3:0][7:0] row_t;

  // ---------------- write path ----------------
  row_t              top_q;
  logic              top_held;
  logic              blk_valid;
  block_t            blk_in;
  row_t              df_row, top_row, bot_row;
  logic [ADDR_W-1:0] waddr_q [2];
  logic              cmp_valid;
  segment_t          cmp_seg;

  assign df_row    = row_t'(df_data[31:0]);
  assign blk_valid = df_valid && df_addr[0];

  always_comb begin
    blk_in    = '0;
    blk_in[0] = top_q[0];  blk_in[1] = top_q[1];
    blk_in[4] = top_q[2];  blk_in[5] = top_q[3];
    blk_in[2] = df_row[0]; blk_in[3] = df_row[1];
    blk_in[6] = df_row[2]; blk_in[7] = df_row[3];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      top_q      <= '0;
      top_held   <= 1'b0;
      waddr_q[0] <= '0;
      waddr_q[1] <= '0;
    end else begin
      if (df_valid && !df_addr[0]) begin
        top_q    <= df_row;
        top_held <= 1'b1;
      end else if (blk_valid) begin
        top_held <= 1'b0;
      end
      waddr_q[0] <= df_addr;
      waddr_q[1] <= waddr_q[0];
    end
  end

  ec_compressor u_comp (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (blk_valid),
    .in_blk   (blk_in),
    .out_valid(cmp_valid),
    .out_seg  (cmp_seg)
  );

  // ---------------- shared address port ----------------
  localparam int unsigned CNT_W = $clog2(RD_DEPTH + 1);

  logic             rd_accept;
  logic [CNT_W-1:0] rd_cnt;         // reads accepted and not yet decompressed

  assign mc_ready  = !cmp_valid && (rd_cnt < CNT_W'(RD_DEPTH));
  assign rd_accept = mc_req && mc_ready;

  ec_addr_map #(.ADDR_W(ADDR_W)) u_map (
    .sel_df  (cmp_valid),
    .mc_addr (mc_addr),
    .df_addr (waddr_q[1]),
    .mem_addr(mem_addr)
  );

  assign mem_req   = cmp_valid || rd_accept;
  assign mem_we    = cmp_valid;
  assign mem_wdata = BUS_W'(cmp_seg);

  // ---------------- read path ----------------
  // Returned segments wait in a small FIFO (bypassed when it is empty) until
  // the decompressor is free. The decompressor's output register holds a
  // block for two clocks: top row (dec_valid), then bottom row (beat1). A new
  // segment is loaded in any clock that is not a top-row clock, so blocks
  // stream back-to-back at four pixels per clock.
  localparam int unsigned PTR_W = (RD_DEPTH > 1) ? $clog2(RD_DEPTH) : 1;

  segment_t         sf_mem [RD_DEPTH];
  logic [PTR_W-1:0] sf_wr, sf_rd;
  logic [CNT_W-1:0] sf_cnt;
  logic             seg_avail, dec_load, sf_push, sf_pop;
  segment_t         head_seg;
  logic             dec_valid;
  block_t           dec_blk;
  logic             beat1;

  assign seg_avail = (sf_cnt != '0) || mem_rvalid;
  assign head_seg  = (sf_cnt != '0) ? sf_mem[sf_rd] : segment_t'(mem_rdata[31:0]);
  assign dec_load  = seg_avail && !dec_valid;
  assign sf_pop    = dec_load && (sf_cnt != '0);
  assign sf_push   = mem_rvalid && !(dec_load && (sf_cnt == '0));

  function automatic logic [PTR_W-1:0] next_ptr(input logic [PTR_W-1:0] p);
    return (32'(p) == RD_DEPTH - 1) ? '0 : p + PTR_W'(1);
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sf_wr  <= '0;
      sf_rd  <= '0;
      sf_cnt <= '0;
      rd_cnt <= '0;
      beat1  <= 1'b0;
    end else begin
      if (sf_push) sf_wr <= next_ptr(sf_wr);
      if (sf_pop) sf_rd <= next_ptr(sf_rd);
      sf_cnt <= sf_cnt + CNT_W'(sf_push) - CNT_W'(sf_pop);
      rd_cnt <= rd_cnt + CNT_W'(rd_accept) - CNT_W'(dec_load);
      beat1  <= dec_valid;
    end
  end

  always_ff @(posedge clk) begin
    if (sf_push) sf_mem[sf_wr] <= segment_t'(mem_rdata[31:0]);
  end

  ec_decompressor u_decomp (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (dec_load),
    .in_seg   (head_seg),
    .out_valid(dec_valid),
    .out_blk  (dec_blk)
  );

  assign top_row   = row_t'({dec_blk[5], dec_blk[4], dec_blk[1], dec_blk[0]});
  assign bot_row   = row_t'({dec_blk[7], dec_blk[6], dec_blk[3], dec_blk[2]});
  assign mc_rvalid = dec_valid || beat1;
  assign mc_rdata  = BUS_W'(dec_valid ? top_row : bot_row);

  // ---------------- protocol rules ----------------
  // A bottom row must follow the top row of the same block.
  a_row_pair: assert property (@(posedge clk) disable iff (!rst_n)
    blk_valid |-> top_held);
  // Read data only returns for an outstanding read, and never overflows the FIFO.
  a_rd_outstanding: assert property (@(posedge clk) disable iff (!rst_n)
    mem_rvalid |-> (rd_cnt != '0));
  a_fifo_room: assert property (@(posedge clk) disable iff (!rst_n)
    sf_push |-> (32'(sf_cnt) < RD_DEPTH));
endmodule
