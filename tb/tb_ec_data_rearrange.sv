// tb_ec_data_rearrange: random 32-bit segments (all modes, start planes and
// decisions) are rebuilt by the data rearrange logic and compared with the
// reference decoder, plus segments produced by the reference coder, whose
// reconstruction must lie close to the original smooth block.
module tb_ec_data_rearrange;
  import ec_pkg::*;
  import tb_ec_model_pkg::*;

  logic     clk = 1'b0;
  segment_t seg = '0;
  block_t   blk;
  int checks = 0, failures = 0;

  ec_data_rearrange dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(int unsigned s);
    blk8_t e;
    seg = segment_t'(s);
    #1;
    e = m_decompress(s);
    checks++;
    foreach (e[i]) if (blk[i] != 8'(e[i])) begin
      failures++; $display("seg %h pixel %0d got %0d expected %0d", s, i, blk[i], e[i]); break;
    end
  endtask

  initial begin
    // mode 2, sp 2, both sides no comparison, planes 1010/0101/1111 and 0000/1111/0000
    check({2'd2, 2'd2, 2'd3, 2'd3, 12'hA5F, 12'h0F0});
    for (int n = 0; n < 20000; n++) check($urandom);
    for (int n = 0; n < 5000; n++) begin
      blk8_t b;
      int maxerr;
      maxerr = 0;
      b = m_rand_block();
      if (n % 2 == 0) foreach (b[i]) b[i] = 100 + (b[i] % 20);
      check(m_compress(b));
      if (n % 2 == 0) begin
        foreach (b[i]) maxerr = (b[i] - blk[i] > maxerr) ? b[i] - blk[i] : (blk[i] - b[i] > maxerr ? blk[i] - b[i] : maxerr);
        checks++;
        if (maxerr > 8) begin failures++; $display("smooth block error %0d", maxerr); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
