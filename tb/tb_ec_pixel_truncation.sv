// tb_ec_pixel_truncation: random and directed blocks through stage 1; the
// registered output must equal the reference clamp one clock later. Also
// counts how often each of the five types was exercised.
module tb_ec_pixel_truncation;
  import ec_pkg::*;
  import tb_ec_model_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0, out_valid;
  block_t in_blk = '0, out_blk;
  int checks = 0, failures = 0;
  int type_seen [5] = '{default: 0};

  ec_pixel_truncation dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(blk8_t b);
    blk8_t e;
    int s = 0, mx = 0, mn = 255;
    e = m_truncate(b);
    foreach (b[i]) begin in_blk[i] = 8'(b[i]); s += b[i]; mx = b[i] > mx ? b[i] : mx; mn = b[i] < mn ? b[i] : mn; end
    in_valid = 1'b1;
    @(posedge clk); #1;
    checks++;
    if (!out_valid) begin failures++; $display("valid missing"); end
    foreach (e[i]) if (out_blk[i] != 8'(e[i])) begin
      failures++; $display("pixel %0d: got %0d expected %0d (in %0d)", i, out_blk[i], e[i], b[i]);
      break;
    end
    if (e == b) type_seen[4]++; else type_seen[(s / 8) / 64]++;
  endtask

  initial begin
    blk8_t b;
    #12 rst_n = 1'b1;
    @(negedge clk);
    // directed: type 1 block with one outlier above 63
    b = '{60, 62, 70, 55, 58, 61, 63, 50}; apply(b);
    // type 2 with pixels on both sides of the range
    b = '{60, 100, 130, 90, 95, 80, 110, 100}; apply(b);
    // type 3
    b = '{127, 150, 195, 160, 170, 140, 180, 150}; apply(b);
    // type 4 with one pixel below 192
    b = '{190, 200, 210, 205, 199, 215, 220, 201}; apply(b);
    // no change: large difference
    b = '{0, 255, 10, 200, 30, 180, 60, 90}; apply(b);
    // boundary: difference exactly 32 in type 1 -> unchanged
    b = '{40, 72, 40, 40, 40, 40, 40, 40}; apply(b);
    for (int n = 0; n < 3000; n++) apply(m_rand_block());
    in_valid = 1'b0;
    @(posedge clk); #1;
    checks++;
    if (out_valid) begin failures++; $display("valid stuck"); end
    foreach (type_seen[t]) begin
      checks++;
      if (type_seen[t] == 0) begin failures++; $display("type %0d never seen", t + 1); end
    end
    $display("types seen: %0d %0d %0d %0d %0d", type_seen[0], type_seen[1], type_seen[2], type_seen[3], type_seen[4]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
