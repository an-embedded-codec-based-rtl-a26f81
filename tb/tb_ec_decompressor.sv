// tb_ec_decompressor: a stream of segments with random gaps; each rebuilt
// block must match the reference decoder exactly one clock after its
// segment (the published one-cycle latency), one block per clock.
module tb_ec_decompressor;
  import ec_pkg::*;
  import tb_ec_model_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0, out_valid;
  segment_t in_seg = '0;
  block_t   out_blk;
  int checks = 0, failures = 0, sent = 0, got = 0;

  ec_decompressor dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #12 rst_n = 1'b1;
    @(negedge clk);
    for (int n = 0; n < 5000; n++) begin
      int unsigned s;
      logic v;
      blk8_t e;
      s = (n % 2) ? $urandom : m_compress(m_rand_block());
      v = ($urandom_range(0, 3) != 0);
      in_seg = segment_t'(s);
      in_valid = v;
      e = m_decompress(s);
      @(posedge clk); #1;
      checks++;
      if (out_valid != v) begin failures++; $display("valid wrong"); end
      if (v) begin
        sent++;
        if (out_valid) got++;
        foreach (e[i]) if (out_blk[i] != 8'(e[i])) begin
          failures++; $display("pixel %0d got %0d expected %0d", i, out_blk[i], e[i]); break;
        end
      end
      @(negedge clk);
    end
    checks++;
    if (got != sent) begin failures++; $display("sent %0d got %0d", sent, got); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
