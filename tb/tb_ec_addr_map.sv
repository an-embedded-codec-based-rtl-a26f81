// tb_ec_addr_map: both address sources, random addresses; the mapped address
// must be half the selected uncompressed word address (compression ratio 2).
module tb_ec_addr_map;
  logic clk = 1'b0;
  logic sel_df = 1'b0;
  logic [19:0] mc_addr = '0, df_addr = '0, mem_addr;
  int checks = 0, failures = 0;

  ec_addr_map dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 5000; n++) begin
      int unsigned m, d;
      m = $urandom_range(0, 20'hFFFFF);
      d = $urandom_range(0, 20'hFFFFF);
      mc_addr = 20'(m);
      df_addr = 20'(d);
      sel_df  = 1'(n);
      #1;
      checks++;
      if (mem_addr != 20'((sel_df ? d : m) / 2)) begin
        failures++; $display("addr got %h (sel %0d, mc %h, df %h)", mem_addr, sel_df, m, d);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
