// tb_ec_system_interface: end-to-end test of the codec interface at its
// default parameters (20-bit addresses, 32-bit bus, 4 outstanding reads).
//
// A deblocking-filter driver writes 4x2 blocks as two 4-pixel rows (with
// random gaps and back-to-back bursts) to random block addresses. A frame
// memory model stores the 32-bit writes and answers reads in order, 1..3
// clocks after each request. A motion-compensation driver issues bursts of
// read requests for blocks already written, holding each until accepted.
// Checked: every write carries the reference coder's segment at half the
// row address, two clocks after the block's bottom row; every read returns
// the reference decoder's block as two consecutive rows, top row first, the
// top row one clock after the memory answer (or right after the previous
// block's bottom row). Each mechanism is counted and must occur: all five
// truncation types, all four modes, all four decisions, a read stalled by a
// write on the shared port, a read held off by a full read FIFO, and a
// stream of at least four blocks at four pixels per clock.
module tb_ec_system_interface;
  import ec_pkg::*;
  import tb_ec_model_pkg::*;

  localparam int NBLK = 2000;

  logic        clk = 1'b0, rst_n = 1'b0;
  logic        df_valid = 1'b0;
  logic [19:0] df_addr = '0;
  logic [31:0] df_data = '0;
  logic        mc_req = 1'b0;
  logic [19:0] mc_addr = '0;
  logic        mc_ready, mc_rvalid;
  logic [31:0] mc_rdata;
  logic        mem_req, mem_we;
  logic [19:0] mem_addr;
  logic [31:0] mem_wdata;
  logic        mem_rvalid = 1'b0;
  logic [31:0] mem_rdata = '0;

  ec_system_interface dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, cycle = 0;
  int n_writes = 0, n_reads = 0, n_stalls = 0, n_busy_waits = 0;
  int type_seen [5] = '{default: 0};
  int mode_seen [4] = '{default: 0};
  int dec_seen  [4] = '{default: 0};
  bit df_done = 0;

  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- frame memory model ----------------
  // Reads are answered in order, each 1..3 clocks after its request.
  typedef struct { int unsigned data; int due; } rd_t;
  int unsigned mem [int];
  rd_t         rd_q [$];
  int          last_due = 0;
  int          rvalid_cyc [$];

  always @(posedge clk) begin
    mem_rvalid <= 1'b0;
    if (rd_q.size() > 0 && rd_q[0].due == cycle) begin
      rd_t r;
      r = rd_q.pop_front();
      mem_rvalid <= 1'b1;
      mem_rdata  <= r.data;
      rvalid_cyc.push_back(cycle + 2);   // clock of the top row when idle
    end
    if (rst_n && mem_req) begin
      if (mem_we) mem[int'(mem_addr)] = mem_wdata;
      else begin
        rd_t r;
        r.data = mem.exists(int'(mem_addr)) ? mem[int'(mem_addr)] : 0;
        r.due  = cycle + $urandom_range(1, 3);
        if (r.due <= last_due) r.due = last_due + 1;
        last_due = r.due;
        rd_q.push_back(r);
      end
    end
  end

  // ---------------- write checking ----------------
  typedef struct { int addr; int unsigned seg; int cyc; } wr_t;
  wr_t wr_q [$];
  int  written [$];     // block addresses whose writes have landed

  always @(posedge clk) begin
    if (rst_n && mem_req && mem_we) begin
      wr_t e;
      checks++;
      if (wr_q.size() == 0) begin failures++; $display("unexpected write"); end
      else begin
        e = wr_q.pop_front();
        if (int'(mem_addr) != e.addr || mem_wdata != e.seg) begin
          failures++; $display("write %h@%h expected %h@%h", mem_wdata, mem_addr, e.seg, e.addr);
        end
        checks++;
        if (cycle - e.cyc != 2) begin failures++; $display("write latency %0d", cycle - e.cyc); end
        written.push_back(e.addr);
        n_writes++;
        mode_seen[e.seg >> 30]++;
        dec_seen[(e.seg >> 26) & 3]++;
        dec_seen[(e.seg >> 24) & 3]++;
      end
      if (mc_req) n_stalls++;
    end else if (rst_n && mc_req && !mc_ready) n_busy_waits++;

  end

  // ---------------- deblocking filter driver ----------------
  function automatic logic [31:0] row(blk8_t b, bit bottom);
    return bottom ? {8'(b[7]), 8'(b[6]), 8'(b[3]), 8'(b[2])}
                  : {8'(b[5]), 8'(b[4]), 8'(b[1]), 8'(b[0])};
  endfunction

  initial begin
    #12 rst_n = 1'b1;
    @(negedge clk);
    for (int n = 0; n < NBLK; n++) begin
      blk8_t b, t;
      int k, s;
      wr_t e;
      b = m_rand_block();
      t = m_truncate(b);
      s = 0;
      foreach (b[i]) s += b[i];
      if (t == b) type_seen[4]++; else type_seen[(s / 8) / 64]++;
      k = $urandom_range(0, 255);
      df_valid = 1'b1; df_addr = 20'(2 * k);     df_data = row(b, 0);
      @(negedge clk);
      if ($urandom_range(0, 3) == 0) begin df_valid = 1'b0; @(negedge clk); end
      df_valid = 1'b1; df_addr = 20'(2 * k + 1); df_data = row(b, 1);
      e.addr = k; e.seg = m_compress(b); e.cyc = cycle;
      wr_q.push_back(e);
      @(negedge clk);
      df_valid = 1'b0;
      repeat ($urandom_range(0, 2)) @(negedge clk);
    end
    df_done = 1;
  end

  // ---------------- motion compensation driver and checker ----------------
  typedef struct { blk8_t b; int k; } exp_t;
  exp_t exp_q [$];
  int   row_no = 0, prev_row_cyc = -10, run = 0, longest_run = 0, n_top = 0;

  // accepted requests: the expected block is the decoded memory word
  always @(posedge clk) begin
    if (rst_n && mc_req && mc_ready) begin
      exp_t e;
      e.k = int'(mc_addr) / 2;
      e.b = m_decompress(mem[e.k]);
      exp_q.push_back(e);
    end
  end

  always @(posedge clk) begin
    if (rst_n) begin
      run = mc_rvalid ? run + 1 : 0;
      if (run > longest_run) longest_run = run;
    end
    if (rst_n && mc_rvalid) begin
      checks++;
      if (exp_q.size() == 0) begin failures++; $display("unexpected read data"); end
      else if (row_no == 0) begin
        int due;
        if (mc_rdata != row(exp_q[0].b, 0)) begin
          failures++; $display("read %0d top row %h expected %h", exp_q[0].k, mc_rdata, row(exp_q[0].b, 0));
        end
        // top row: one clock after the memory answer, or right after the previous block
        due = rvalid_cyc.pop_front();
        if (prev_row_cyc + 1 > due) due = prev_row_cyc + 1;
        checks++;
        if (cycle != due) begin failures++; $display("top row at %0d expected %0d", cycle, due); end
        row_no = 1;
        n_top++;
      end else begin
        exp_t e;
        e = exp_q.pop_front();
        if (mc_rdata != row(e.b, 1)) begin
          failures++; $display("read %0d bottom row %h expected %h", e.k, mc_rdata, row(e.b, 1));
        end
        checks++;
        if (cycle != prev_row_cyc + 1) begin failures++; $display("bottom row not after top row"); end
        row_no = 0;
        n_reads++;
      end
      prev_row_cyc = cycle;
    end
  end

  initial begin
    int burst;
    burst = 0;
    @(posedge rst_n);
    while (!df_done || n_top < NBLK) begin
      @(negedge clk);
      if (burst == 0 && $urandom_range(0, 7) == 0) burst = $urandom_range(1, 24);
      if (mc_req && !mc_ready) begin
        // hold the request until it is taken
      end else if (written.size() > 0 && burst > 0) begin
        mc_req  = 1'b1;
        mc_addr = 20'(2 * written[$urandom_range(0, written.size() - 1)]);
        burst--;
      end else mc_req = 1'b0;
    end
    mc_req = 1'b0;
    repeat (20) @(negedge clk);
    checks++;
    if (wr_q.size() != 0) begin failures++; $display("%0d writes missing", wr_q.size()); end
    // every mechanism must have happened
    foreach (type_seen[i]) begin checks++; if (type_seen[i] == 0) begin failures++; $display("truncation type %0d never", i + 1); end end
    foreach (mode_seen[i]) begin checks++; if (mode_seen[i] == 0) begin failures++; $display("mode %0d never", i); end end
    foreach (dec_seen[i])  begin checks++; if (dec_seen[i] == 0)  begin failures++; $display("decision %0d never", i); end end
    checks++; if (n_stalls == 0)     begin failures++; $display("no write/read port conflict"); end
    checks++; if (n_busy_waits == 0) begin failures++; $display("no read held off by full read FIFO"); end
    checks++; if (exp_q.size() != 0) begin failures++; $display("%0d reads unanswered", exp_q.size()); end
    checks++; if (longest_run < 8) begin failures++; $display("no back-to-back stream of 4 blocks"); end
    $display("writes %0d reads %0d conflicts %0d fifo-full waits %0d longest row stream %0d",
             n_writes, n_reads, n_stalls, n_busy_waits, longest_run);
    $display("types %0d %0d %0d %0d %0d modes %0d %0d %0d %0d decisions %0d %0d %0d %0d",
             type_seen[0], type_seen[1], type_seen[2], type_seen[3], type_seen[4],
             mode_seen[0], mode_seen[1], mode_seen[2], mode_seen[3],
             dec_seen[0], dec_seen[1], dec_seen[2], dec_seen[3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
