// tb_ec_mc_access: motion-compensation read workloads through the codec
// interface at its default parameters.
//
// Motion compensation of one 4x4 block reads a reference area whose size
// depends on the motion vector: each component is aligned to the 4-pixel
// grid, not aligned (integer), or at a sub-pixel position (9 pixels for 4).
// In compressed 4x2 blocks the nine cases need 2, 3, 5, 4, 6, 10, 6, 9 and
// 15 blocks (worst alignment of each case). Each case is run against a
// memory with a fixed read latency L of 1 to 6 clocks: the blocks are first
// written through the deblocking-filter port, then requested back to back.
// Every row is checked against the reference decoder, and the time from
// the first request to the last row must be exactly L + 2N + 1 clocks, i.e.
// the rows stream without a gap at four pixels per clock.
//
// For each L the testbench prints the clocks of the worst case and the
// average over the case mix, weighted with the occurrence probabilities
// published for the original decoder, for comparison with its budget of
// 25 clocks per 4x4 block.
module tb_ec_mc_access;
  import ec_pkg::*;
  import tb_ec_model_pkg::*;

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
  logic        mem_rvalid;
  logic [31:0] mem_rdata;

  ec_system_interface dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, cycle = 0, lat = 1;
  int unsigned mem [int];
  int unsigned pipe_data [16];
  bit          pipe_v [16];

  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // memory with a fixed read latency of lat clocks
  always @(posedge clk) begin
    for (int i = 15; i > 0; i--) begin pipe_v[i] <= pipe_v[i-1]; pipe_data[i] <= pipe_data[i-1]; end
    pipe_v[0] <= 1'b0;
    if (rst_n && mem_req && mem_we) mem[int'(mem_addr)] = mem_wdata;
    if (rst_n && mem_req && !mem_we) begin
      pipe_v[0]    <= 1'b1;
      pipe_data[0] <= mem.exists(int'(mem_addr)) ? mem[int'(mem_addr)] : 0;
    end
  end
  assign mem_rvalid = pipe_v[lat - 1];
  assign mem_rdata  = pipe_data[lat - 1];

  function automatic logic [31:0] row(blk8_t b, bit bottom);
    return bottom ? {8'(b[7]), 8'(b[6]), 8'(b[3]), 8'(b[2])}
                  : {8'(b[5]), 8'(b[4]), 8'(b[1]), 8'(b[0])};
  endfunction

  int nblk [9] = '{2, 3, 5, 4, 6, 10, 6, 9, 15};
  real prob [9] = '{33.0, 0.4, 5.1, 4.5, 0.4, 5.4, 23.5, 1.81, 25.8};
  string cname [9] = '{"(Align, Align)", "(Align, Not Align)", "(Align, Sub)", "(Not Align, Align)",
                       "(Not Align, Not Align)", "(Not Align, Sub)", "(Sub, Align)", "(Sub, Not Align)",
                       "(Sub, Sub)"};

  initial begin
    blk8_t blocks [16];
    real   wsum, psum;
    int    rows_seen, t0, tl, issued;
    #12 rst_n = 1'b1;
    for (int l = 1; l <= 6; l++) begin
      lat = l;
      wsum = 0.0; psum = 0.0;
      for (int c = 0; c < 9; c++) begin
        int n;
        n = nblk[c];
        // write the N blocks through the deblocking-filter port
        @(negedge clk);
        for (int k = 0; k < n; k++) begin
          blocks[k] = m_rand_block();
          df_valid = 1'b1; df_addr = 20'(2 * k);     df_data = row(blocks[k], 0); @(negedge clk);
          df_valid = 1'b1; df_addr = 20'(2 * k + 1); df_data = row(blocks[k], 1); @(negedge clk);
        end
        df_valid = 1'b0;
        repeat (4) @(negedge clk);
        // request them back to back and watch the rows
        issued = 0; rows_seen = 0; t0 = cycle; tl = 0;
        fork
          begin
            while (issued < n) begin
              mc_req = 1'b1; mc_addr = 20'(2 * issued);
              @(posedge clk);
              if (mc_ready) issued++;
              @(negedge clk);
            end
            mc_req = 1'b0;
          end
          begin
            while (rows_seen < 2 * n) begin
              @(posedge clk);
              if (mc_rvalid) begin
                blk8_t e;
                e = m_decompress(mem[rows_seen / 2]);
                checks++;
                if (mc_rdata != row(e, rows_seen % 2)) begin
                  failures++; $display("case %s row %0d wrong", cname[c], rows_seen);
                end
                rows_seen++;
                tl = cycle;
              end
            end
          end
        join
        checks++;
        if (tl - t0 + 1 != l + 2 * n + 1) begin
          failures++; $display("lat %0d case %s: %0d clocks, expected %0d", l, cname[c], tl - t0 + 1, l + 2 * n + 1);
        end
        wsum += prob[c] * real'(tl - t0 + 1);
        psum += prob[c];
        if (c == 8) $display("memory latency %0d: worst case %0d blocks in %0d clocks", l, n, tl - t0 + 1);
      end
      $display("memory latency %0d: weighted average %0.1f clocks per 4x4 block", l, wsum / psum);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
