// tb_ec_compensation: random pixels and start planes through both rounding
// units, compared with the reference rounding; also counts rounding up,
// saturation (field all ones) and no rounding for each unit.
module tb_ec_compensation;
  import ec_pkg::*;
  import tb_ec_model_pkg::*;

  logic   clk = 1'b0;
  block_t blk = '0, cmp_blk, nocmp_blk;
  logic [1:0] sp = '0;
  int checks = 0, failures = 0;
  int up = 0, sat = 0, same = 0;

  ec_compensation dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // published example: 0101_1100 with start plane at the MSB -> 0110_xxxx
    blk = '0; blk[0] = 8'b0101_1100; sp = 2'd0; #1;
    checks++;
    if (cmp_blk[0][7:4] != 4'b0110) begin failures++; $display("example failed: %b", cmp_blk[0]); end
    checks++;
    if (nocmp_blk[0][7:5] != 3'b011) begin failures++; $display("example 2 failed: %b", nocmp_blk[0]); end
    for (int n = 0; n < 20000; n++) begin
      int s;
      s  = $urandom_range(0, 3);
      sp = 2'(s);
      foreach (blk[i]) blk[i] = 8'($urandom_range(0, 255));
      if (n % 7 == 0) blk[0] = 8'hFF;
      #1;
      foreach (blk[i]) begin
        int e4, e3;
        e4 = m_round(blk[i], s, 4);
        e3 = m_round(blk[i], s, 3);
        checks++;
        if (cmp_blk[i] != 8'(e4) || nocmp_blk[i] != 8'(e3)) begin
          failures++;
          $display("pix %0d sp %0d: got %0d/%0d expected %0d/%0d", blk[i], s, cmp_blk[i], nocmp_blk[i], e4, e3);
        end
        if (e4 != blk[i]) up++;
        else if (((blk[i] >> (3 - s)) & 1) == 1) sat++;
        else same++;
      end
    end
    checks++;
    if (up == 0 || sat == 0 || same == 0) begin failures++; $display("coverage %0d %0d %0d", up, sat, same); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
