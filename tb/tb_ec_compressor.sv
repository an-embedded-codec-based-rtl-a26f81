// tb_ec_compressor: a stream of blocks, one per clock with random gaps, is
// compressed; each segment must equal the reference coder's and arrive
// exactly two clocks after its block (the published latency). The
// reconstruction error is also measured through the reference decoder.
module tb_ec_compressor;
  import ec_pkg::*;
  import tb_ec_model_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0, out_valid;
  block_t   in_blk = '0;
  segment_t out_seg;
  int checks = 0, failures = 0;
  int unsigned exp_q [$];
  int          cyc_q [$];
  int cycle = 0, sent = 0, got = 0;
  longint sqerr = 0;

  ec_compressor dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // checker
  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      int unsigned e;
      int c;
      checks++;
      if (exp_q.size() == 0) begin
        failures++; $display("unexpected segment");
      end else begin
        e = exp_q.pop_front();
        c = cyc_q.pop_front();
        if (32'(out_seg) != e) begin failures++; $display("segment %h expected %h", out_seg, e); end
        checks++;
        if (cycle - c != 2) begin failures++; $display("latency %0d", cycle - c); end
        got++;
      end
    end
  end

  initial begin
    #12 rst_n = 1'b1;
    @(negedge clk);
    for (int n = 0; n < 5000; n++) begin
      blk8_t b, d;
      b = m_rand_block();
      foreach (b[i]) in_blk[i] = 8'(b[i]);
      in_valid = ($urandom_range(0, 3) != 0);
      if (in_valid) begin
        exp_q.push_back(m_compress(b));
        cyc_q.push_back(cycle);
        sent++;
        d = m_decompress(m_compress(b));
        foreach (b[i]) sqerr += (b[i] - d[i]) * (b[i] - d[i]);
      end
      @(negedge clk);
    end
    in_valid = 1'b0;
    repeat (4) @(negedge clk);
    checks++;
    if (got != sent || exp_q.size() != 0) begin failures++; $display("sent %0d got %0d", sent, got); end
    $display("blocks %0d, mean squared error %0.2f", sent, real'(sqerr) / (8.0 * sent));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
