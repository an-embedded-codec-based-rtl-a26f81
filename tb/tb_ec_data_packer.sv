// tb_ec_data_packer: random header fields and coded data; the packed segment
// must carry every field in its place one clock after the header is given,
// with the valid flag delayed by the same clock.
module tb_ec_data_packer;
  import ec_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0, out_valid;
  logic [1:0]  mode = '0, sp = '0;
  logic [3:0]  decision = '0;
  logic [23:0] coded = '0;
  segment_t    out_seg;
  int checks = 0, failures = 0;

  ec_data_packer dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #12 rst_n = 1'b1;
    @(negedge clk);
    for (int n = 0; n < 2000; n++) begin
      logic [7:0] h;
      logic       v;
      h = 8'($urandom);
      v = 1'($urandom);
      {mode, sp, decision} = h;
      in_valid = v;
      @(posedge clk); #1;
      // coded data is registered upstream: present it in the cycle after
      coded = 24'($urandom);
      #1;
      checks++;
      if (out_valid != v || out_seg.mode != h[7:6] || out_seg.sp != h[5:4]
          || out_seg.dec_l != decision_e'(h[3:2]) || out_seg.dec_r != decision_e'(h[1:0])
          || out_seg.coded_l != coded[23:12] || out_seg.coded_r != coded[11:0]
          || 32'(out_seg) != {h, coded}) begin
        failures++; $display("segment %h expected %h", out_seg, {h, coded});
      end
      {mode, sp, decision} = ~h;   // must not leak into the registered header
      #1;
      checks++;
      if (32'(out_seg) != {h, coded}) begin failures++; $display("header not held"); end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
