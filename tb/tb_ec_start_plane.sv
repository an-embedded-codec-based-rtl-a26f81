// tb_ec_start_plane: exhaustive-style check of the start plane and mode
// search against the reference model, on random blocks biased towards
// uniform top bitplanes, plus directed blocks for each mode and start plane.
module tb_ec_start_plane;
  import ec_pkg::*;
  import tb_ec_model_pkg::*;

  logic   clk = 1'b0;
  block_t blk = '0;
  logic [1:0] sp, mode;
  int checks = 0, failures = 0;
  int sp_seen [4] = '{default: 0};
  int mode_seen [4] = '{default: 0};

  ec_start_plane dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(blk8_t b);
    int e;
    foreach (b[i]) blk[i] = 8'(b[i]);
    #1;
    e = m_start_plane(b);
    checks++;
    if ({mode, sp} != 4'(e)) begin
      failures++; $display("mode/sp got %0d/%0d expected %0d/%0d", mode, sp, e / 4, e % 4);
    end
    sp_seen[e % 4]++;
    if (e % 4 > 1) mode_seen[e / 4]++;
  endtask

  initial begin
    blk8_t b;
    b = '{3, 7, 31, 0, 12, 9, 1, 30};       check(b);   // mode 0, sp 3
    b = '{64, 70, 95, 80, 66, 90, 71, 68};  check(b);   // mode 1, sp 3
    b = '{128, 150, 140, 130, 159, 129, 131, 135}; check(b); // mode 2, sp 3
    b = '{192, 200, 223, 210, 199, 215, 220, 201}; check(b); // mode 3, sp 3
    b = '{0, 127, 3, 70, 5, 6, 100, 8};      check(b);   // sp 1
    b = '{0, 255, 3, 70, 5, 6, 100, 8};      check(b);   // sp 0
    b = '{0, 63, 3, 40, 5, 6, 33, 8};        check(b);   // sp 2
    for (int n = 0; n < 20000; n++) begin
      int hi, r;
      hi = $urandom_range(0, 7) * 32;
      r  = $urandom_range(0, 3);
      foreach (b[i]) b[i] = (r == 0) ? $urandom_range(0, 255) : hi + $urandom_range(0, (r == 1) ? 31 : 63);
      foreach (b[i]) if (b[i] > 255) b[i] = 255;
      check(b);
    end
    foreach (sp_seen[s]) begin
      checks++;
      if (sp_seen[s] == 0) begin failures++; $display("sp %0d never seen", s); end
      checks++;
      if (mode_seen[s] == 0) begin failures++; $display("mode %0d never seen", s); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
