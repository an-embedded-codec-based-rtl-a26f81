// tb_ec_bitplane_compare: truncated random blocks are rounded by the reference
// model and fed to the comparison block; the combinational decisions and the
// registered coded data (one clock later) must match the reference coder.
// Counts every decision (groups A, B, C, no comparison) on both sides, and
// exact versus nearest-pattern coding of the fourth plane.
module tb_ec_bitplane_compare;
  import ec_pkg::*;
  import tb_ec_model_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  block_t cmp_blk = '0, nocmp_blk = '0;
  logic [1:0]  sp = '0;
  logic [3:0]  decision;
  logic [23:0] coded;
  int checks = 0, failures = 0;
  int dec_seen [4] = '{default: 0};

  ec_bitplane_compare dut (.*);

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
    for (int n = 0; n < 10000; n++) begin
      blk8_t t, cb, nb;
      int ms, s, l, r;
      t  = m_truncate(m_rand_block());
      ms = m_start_plane(t);
      s  = ms % 4;
      foreach (t[i]) begin cb[i] = m_round(t[i], s, 4); nb[i] = m_round(t[i], s, 3); end
      foreach (t[i]) begin cmp_blk[i] = 8'(cb[i]); nocmp_blk[i] = 8'(nb[i]); end
      sp = 2'(s);
      l = m_side(cb, nb, 0, s);
      r = m_side(cb, nb, 4, s);
      #1;
      checks++;
      if (decision != 4'((l / 4096) * 4 + r / 4096)) begin
        failures++; $display("decision got %b expected %0d,%0d", decision, l / 4096, r / 4096);
      end
      dec_seen[l / 4096]++;
      dec_seen[r / 4096]++;
      @(posedge clk); #1;
      checks++;
      if (coded != 24'((l % 4096) * 4096 + r % 4096)) begin
        failures++; $display("coded got %h expected %h", coded, (l % 4096) * 4096 + r % 4096);
      end
      @(negedge clk);
    end
    foreach (dec_seen[d]) begin
      checks++;
      if (dec_seen[d] == 0) begin failures++; $display("decision %0d never seen", d); end
    end
    $display("decisions A/B/C/none: %0d %0d %0d %0d", dec_seen[0], dec_seen[1], dec_seen[2], dec_seen[3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
