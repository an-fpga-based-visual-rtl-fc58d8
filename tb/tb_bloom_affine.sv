// tb_bloom_affine: self-checking test of Stage 1 (bloom_affine).
//
// A 32x12 Bayer frame with a saturated light source, a halo around it and a
// textured darker background is streamed through the stage twice: once without
// gaps (the fixed latency of 5 lines + 2 beats + 9 cycles is checked) and once
// with random idle cycles inside the frame and different gain, bloom-core and
// black-level settings. Every output pixel and every frame flag is compared
// with the whole-frame reference model, and the test checks that the dark,
// halo, maximum-suppression and light-core regions of the gain curve all occur.
module tb_bloom_affine;
  import isp_pkg::*;
  import isp_ref_pkg::*;

  localparam int W = 32, H = 12, BPL = W / 4;

  logic clk = 0, rst_n = 0;
  logic in_valid = 0;
  frame_flags_t in_flags = '0;
  raw_beat_t in_data = '0;
  logic [7:0] gain = 64, core = 150;
  logic [3:0][9:0] blc = '0;
  logic out_valid;
  frame_flags_t out_flags;
  raw_beat_t out_data;

  bloom_affine #(.WIDTH(W), .HEIGHT(H), .BAYER(BAYER_RGGB)) dut (
    .clk, .rst_n, .in_valid, .in_flags, .in_data, .global_gain(gain), .bloom_core(core),
    .blc_offset(blc), .out_valid, .out_flags, .out_data);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cyc = 0;
  int t_in = -1, t_out = -1;
  int img[], exp_px[], lg[];
  int n_out = 0;
  int cov_dark = 0, cov_halo = 0, cov_max = 0, cov_core = 0;

  always @(posedge clk) cyc <= cyc + 1;

  // capture and compare
  always @(posedge clk) begin
    if (in_valid && in_flags.sof && t_in < 0) t_in = cyc;
    if (out_valid && rst_n) begin
      int r, b;
      r = n_out / BPL;
      b = n_out % BPL;
      if (out_flags.sof && t_out < 0) t_out = cyc;
      checks++;
      if (out_flags.sof != (n_out == 0) || out_flags.eol != (b == BPL - 1) ||
          out_flags.eof != (n_out == W * H / 4 - 1)) begin
        failures++;
        $display("flag mismatch at beat %0d: %b", n_out, out_flags);
      end
      for (int p = 0; p < 4; p++) begin
        int got, e;
        got = int'(out_data[p*10 +: 10]);
        e = exp_px[r * W + b * 4 + p];
        checks++;
        if (got !== e) begin
          failures++;
          if (failures < 10) $display("pixel (%0d,%0d): got %0d expected %0d", r, b*4+p, got, e);
        end
      end
      n_out++;
    end
  end

  task automatic make_frame(int cx, int cy);
    img = new[W * H];
    for (int r = 0; r < H; r++)
      for (int c = 0; c < W; c++) begin
        int d2 = (r - cy) * (r - cy) + (c - cx) * (c - cx);
        int v;
        if (d2 <= 2)       v = 1023;
        else if (d2 <= 20) v = 1023 - d2 * 35;
        else               v = 60 + int'($urandom_range(0, 200));
        if ((r + c) % 7 == 0 && d2 > 2) v = v / 3;    // dark texture inside the halo
        img[r * W + c] = v;
      end
  endtask

  task automatic send_frame(bit gaps);
    for (int r = 0; r < H; r++)
      for (int b = 0; b < BPL; b++) begin
        while (gaps && ($urandom_range(0, 3) == 0)) begin
          in_valid <= 0;
          @(posedge clk);
        end
        in_valid <= 1;
        in_flags.sof <= (r == 0 && b == 0);
        in_flags.eol <= (b == BPL - 1);
        in_flags.eof <= (r == H - 1 && b == BPL - 1);
        for (int p = 0; p < 4; p++) in_data[p*10 +: 10] <= 10'(img[r * W + b * 4 + p]);
        @(posedge clk);
      end
    in_valid <= 0;
    in_flags <= '0;
  endtask

  task automatic run_frame(bit gaps, int g, int k, int b0, int b1, int b2, int b3, int cx, int cy);
    int blc_i[4];
    blc_i = '{b0, b1, b2, b3};
    make_frame(cx, cy);
    gain = 8'(g);
    core = 8'(k);
    blc  = {10'(b3), 10'(b2), 10'(b1), 10'(b0)};
    bloom_frame(img, W, H, 0, g, k, blc_i, exp_px, lg);
    for (int i = 0; i < W * H; i++) begin
      int raw8 = img[i] >> 2;
      if (lg[i] == 64 && raw8 > k) cov_core++;
      else if (lg[i] == 64)        cov_dark++;
      else if (lg[i] == 32)        cov_max++;
      else                         cov_halo++;
    end
    n_out = 0;
    send_frame(gaps);
    repeat (5 * BPL + 40) @(posedge clk);
    checks++;
    if (n_out != W * H / 4) begin
      failures++;
      $display("frame produced %0d beats, expected %0d", n_out, W * H / 4);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (2) @(posedge clk);
    run_frame(0, 64, 150, 0, 0, 0, 0, 20, 5);
    checks++;
    if (t_out - t_in != 5 * BPL + 2 + 9) begin
      failures++;
      $display("latency %0d cycles, expected %0d", t_out - t_in, 5 * BPL + 2 + 9);
    end
    run_frame(1, 90, 120, 16, 8, 8, 24, 6, 8);
    run_frame(1, 30, 40, 0, 4, 0, 0, 28, 2);
    run_frame(0, 96, 0, 0, 0, 0, 0, 14, 6);
    checks += 4;
    if (cov_dark == 0) begin failures++; $display("no dark-region pixel"); end
    if (cov_halo == 0) begin failures++; $display("no halo pixel"); end
    if (cov_max  == 0) begin failures++; $display("no maximum-suppression pixel"); end
    if (cov_core == 0) begin failures++; $display("no light-core pixel"); end
    $display("coverage: dark %0d halo %0d max %0d core %0d", cov_dark, cov_halo, cov_max, cov_core);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
