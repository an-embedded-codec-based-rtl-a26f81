// tb_ec_frame_psnr: one synthetic 352x288 (CIF) luma frame through the
// compressor and decompressor back to back, one 4x2 block per clock.
//
// The frame mixes smooth gradients, sharp edges and noisy texture. Every
// reconstructed block must equal the reference decoder's output, the whole
// frame must pass in (blocks + 3) clocks (2-cycle compressor plus 1-cycle
// decompressor latency, one block per clock), and the frame PSNR is
// reported; it must exceed 25 dB for this content.
module tb_ec_frame_psnr;
  import ec_pkg::*;
  import tb_ec_model_pkg::*;

  localparam int W = 352, H = 288, NB = (W / 4) * (H / 2);

  logic clk = 1'b0, rst_n = 1'b0;
  logic     c_in_valid = 1'b0, c_out_valid, d_out_valid;
  block_t   c_in_blk = '0, d_out_blk;
  segment_t c_out_seg;
  int checks = 0, failures = 0, cycle = 0, first_cyc = -1, last_cyc = 0, got = 0;
  longint sqerr = 0;
  byte unsigned frame [H][W];
  blk8_t exp_q [$];
  blk8_t org_q [$];

  ec_compressor   u_c (.clk(clk), .rst_n(rst_n), .in_valid(c_in_valid), .in_blk(c_in_blk),
                       .out_valid(c_out_valid), .out_seg(c_out_seg));
  ec_decompressor u_d (.clk(clk), .rst_n(rst_n), .in_valid(c_out_valid), .in_seg(c_out_seg),
                       .out_valid(d_out_valid), .out_blk(d_out_blk));

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (NB * 2 + 1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (rst_n && d_out_valid) begin
      blk8_t e, o;
      e = exp_q[0];
      o = org_q[0];
      exp_q.delete(0);
      org_q.delete(0);
      checks++;
      foreach (e[i]) if (d_out_blk[i] != 8'(e[i])) begin
        failures++; $display("block %0d pixel %0d got %0d expected %0d", got, i, d_out_blk[i], e[i]); break;
      end
      foreach (o[i]) sqerr += (o[i] - int'(d_out_blk[i])) * (o[i] - int'(d_out_blk[i]));
      got++;
      last_cyc = cycle;
    end
  end

  initial begin
    // synthetic frame: gradient sky, a bright disc with a sharp edge, textured ground
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++) begin
        int v;
        if (y < H / 2) v = 40 + (x * 120) / W + y / 4;
        else v = 90 + int'($urandom_range(0, 40)) + ((x / 8 + y / 8) % 2) * 30;
        if ((x - 250) * (x - 250) + (y - 80) * (y - 80) < 40 * 40) v = 230;
        frame[y][x] = 8'(clampi(v, 0, 255));
      end
    #12 rst_n = 1'b1;
    @(negedge clk);
    for (int by = 0; by < H / 2; by++)
      for (int bx = 0; bx < W / 4; bx++) begin
        blk8_t b;
        // pixel order of a 4x2 block: top row 0 1 4 5, bottom row 2 3 6 7
        b[0] = frame[2*by][4*bx];     b[1] = frame[2*by][4*bx+1];
        b[4] = frame[2*by][4*bx+2];   b[5] = frame[2*by][4*bx+3];
        b[2] = frame[2*by+1][4*bx];   b[3] = frame[2*by+1][4*bx+1];
        b[6] = frame[2*by+1][4*bx+2]; b[7] = frame[2*by+1][4*bx+3];
        foreach (b[i]) c_in_blk[i] = 8'(b[i]);
        c_in_valid = 1'b1;
        if (first_cyc < 0) first_cyc = cycle;
        exp_q.push_back(m_decompress(m_compress(b)));
        org_q.push_back(b);
        @(negedge clk);
      end
    c_in_valid = 1'b0;
    repeat (6) @(negedge clk);
    checks++;
    if (got != NB) begin failures++; $display("blocks out %0d of %0d", got, NB); end
    checks++;
    if (last_cyc - first_cyc + 1 != NB + 3) begin
      failures++; $display("frame took %0d clocks, expected %0d", last_cyc - first_cyc + 1, NB + 3);
    end
    begin
      real mse, psnr;
      mse  = real'(sqerr) / real'(W * H);
      psnr = 10.0 * $log10(255.0 * 255.0 / mse);
      $display("CIF frame: %0d blocks in %0d clocks, MSE %0.2f, PSNR %0.2f dB", NB, last_cyc - first_cyc + 1, mse, psnr);
      checks++;
      if (psnr < 25.0) begin failures++; $display("PSNR too low"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
