// tb_isp_top: end-to-end test of the whole ISP (isp_top) at 32x16 pixels.
//
// Twelve frames with a point light source and its halo over backgrounds of
// scripted brightness are streamed through the pipeline, some with random
// idle cycles inside the frame and with a non-zero black level. The expected
// RGB output of every frame is computed by chaining the reference models:
// the AEC model run on the previous frame gives the gain and bloom core,
// then bloom correction, bilinear demosaicing and the AWB+gamma tables. Every
// output pixel, the frame flags, the AEC status after each frame and the
// first-frame latency (6 lines + 3 beats + 19 cycles) are checked.
// Mechanisms counted, each of which must occur: halo suppression, maximum
// suppression, light-core exemption, the AEC decisions IDLE, LIFT, CLAMP,
// BOTH and OE_CUT, a gain change carried into the next frame, input gaps, and the
// end-of-frame flush (every output frame must be complete).
module tb_isp_top;
  import isp_pkg::*;
  import isp_ref_pkg::*;

  localparam int W = 32, H = 16, BPL = W / 4;
  localparam int VBLANK = 6 * BPL + 400;

  logic clk = 0, rst_n = 0;
  logic in_valid = 0;
  frame_flags_t in_flags = '0;
  raw_beat_t in_data = '0;
  logic [3:0][9:0] blc = '0;
  logic out_valid;
  frame_flags_t out_flags;
  rgb_beat_t out_data;
  logic [7:0] aec_gain, aec_bloom_core, aec_p02, aec_p50, aec_p98;
  logic [21:0] aec_oe_count, aec_ue_count;
  logic [2:0] aec_decision;
  logic aec_update;

  isp_top #(.WIDTH(W), .HEIGHT(H)) dut (
    .clk, .rst_n, .in_valid, .in_flags, .in_data, .blc_offset(blc),
    .out_valid, .out_flags, .out_data,
    .aec_gain, .aec_bloom_core, .aec_p02, .aec_p50, .aec_p98,
    .aec_oe_count, .aec_ue_count, .aec_decision, .aec_update);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cyc = 0;
  int t_in = -1, t_out = -1;
  int img[];
  int exp_rgb[$][];        // expected {R,G,B} per pixel, one entry per frame in flight
  int cur_exp[];
  int n_out = 0, frames_out = 0;
  int gain_m = 64, core_m = 199;
  int cov_halo = 0, cov_max = 0, cov_core = 0, cov_gaps = 0, cov_gain_change = 0;
  int cov_dec [5] = '{0, 0, 0, 0, 0};

  always @(posedge clk) cyc <= cyc + 1;

  always @(posedge clk) begin
    if (in_valid && in_flags.sof && t_in < 0) t_in = cyc;
    if (out_valid && rst_n) begin
      int r, b;
      if (n_out == 0) begin
        if (exp_rgb.size() == 0) begin
          failures++;
          $display("output without a frame in flight");
          cur_exp = new[W * H];
        end else cur_exp = exp_rgb.pop_front();
      end
      r = n_out / BPL;
      b = n_out % BPL;
      if (out_flags.sof && t_out < 0) t_out = cyc;
      checks++;
      if (out_flags.sof != (n_out == 0) || out_flags.eol != (b == BPL - 1) ||
          out_flags.eof != (n_out == W * H / 4 - 1)) begin
        failures++;
        $display("flag mismatch at beat %0d", n_out);
      end
      for (int p = 0; p < 4; p++) begin
        int got, e;
        got = int'(out_data[p*24 +: 24]);
        e = cur_exp[r * W + b * 4 + p];
        checks++;
        if (got != e) begin
          failures++;
          if (failures < 10)
            $display("frame %0d pixel (%0d,%0d): got %h expected %h", frames_out, r, b*4+p, got, e);
        end
      end
      n_out++;
      if (n_out == W * H / 4) begin
        n_out = 0;
        frames_out++;
      end
    end
  end

  task automatic make_frame(int lo, int hi, int core_r2, int cx, int cy);
    img = new[W * H];
    for (int r = 0; r < H; r++)
      for (int c = 0; c < W; c++) begin
        int d2 = (r - cy) * (r - cy) + (c - cx) * (c - cx);
        int v;
        if (d2 <= core_r2)  v = 1023;
        else if (d2 <= 20)  v = 880 - d2 * 30;
        else                v = int'($urandom_range(lo, hi));
        if ((r * 3 + c) % 5 == 0 && d2 > core_r2) v = v / 4;   // texture inside the halo
        img[r * W + c] = v;
      end
  endtask

  task automatic run_frame(int lo, int hi, int core_r2, int cx, int cy, bit gaps, int black);
    int blc_i[4];
    int s1[], lg[], rr[], gg[], bb[], e[];
    aec_result_t m;
    make_frame(lo, hi, core_r2, cx, cy);
    blc_i = '{black, black, black, black};
    blc   = {4{10'(black)}};
    bloom_frame(img, W, H, 0, gain_m, core_m, blc_i, s1, lg);
    demosaic_frame(s1, W, H, 0, rr, gg, bb);
    e = new[W * H];
    for (int i = 0; i < W * H; i++) begin
      e[i] = (awb_gamma(rr[i], 124, 1.6) << 16) | (awb_gamma(gg[i], 64, 1.6) << 8) |
             awb_gamma(bb[i], 100, 1.6);
      if (lg[i] == 64 && (img[i] >> 2) > core_m) cov_core++;
      else if (lg[i] == 32)                     cov_max++;
      else if (lg[i] < 64)                      cov_halo++;
    end
    exp_rgb.push_back(e);
    m = aec_frame(img, W, H, 0, gain_m);
    for (int r = 0; r < H; r++)
      for (int b = 0; b < BPL; b++) begin
        while (gaps && ($urandom_range(0, 4) == 0)) begin
          in_valid <= 0;
          cov_gaps++;
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
    repeat (VBLANK) @(posedge clk);
    checks += 3;
    if (aec_gain != 8'(m.gain)) begin
      failures++; $display("AEC gain %0d expected %0d", aec_gain, m.gain);
    end
    if (aec_bloom_core != 8'(m.core)) begin
      failures++; $display("AEC bloom core %0d expected %0d", aec_bloom_core, m.core);
    end
    if (aec_decision != 3'(m.dec)) begin
      failures++; $display("AEC decision %0d expected %0d", aec_decision, m.dec);
    end
    cov_dec[m.dec]++;
    $display("frame done: decision %0d gain %0d -> %0d, p02 %0d p98 %0d oe %0d", m.dec, gain_m, m.gain, m.p02, m.p98, m.oe);
    if (m.gain != gain_m) cov_gain_change++;
    gain_m = m.gain;
    core_m = m.core;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (300) @(posedge clk);
    run_frame(0, 300, 0, 20, 6, 0, 0);     // dark: lift
    checks++;
    if (t_out - t_in != 6 * BPL + 3 + 19) begin
      failures++;
      $display("latency %0d cycles, expected %0d", t_out - t_in, 6 * BPL + 3 + 19);
    end
    run_frame(0, 300, 0, 8, 9, 1, 0);
    run_frame(0, 300, 0, 25, 3, 0, 8);
    run_frame(0, 300, 0, 12, 12, 1, 0);
    run_frame(0, 900, 0, 22, 9, 0, 0);     // deep shadows and bright areas: both
    run_frame(600, 900, 0, 16, 8, 0, 0);   // bright at raised gain: clamp
    run_frame(600, 900, 0, 5, 5, 1, 16);
    run_frame(300, 500, 0, 26, 10, 0, 0);  // moderate
    run_frame(0, 200, 0, -100, 0, 0, 0);   // dark, no light source: lowers the bloom core
    run_frame(200, 600, 6, 14, 7, 1, 0);   // large saturated source: over-exposure cut
    run_frame(300, 500, 0, 9, 4, 0, 0);
    run_frame(300, 500, 0, 20, 11, 1, 4);
    checks += 12;
    if (frames_out != 12) begin failures++; $display("%0d frames came out, expected 12", frames_out); end
    if (cov_halo == 0) begin failures++; $display("no halo suppression"); end
    if (cov_max == 0)  begin failures++; $display("no maximum suppression"); end
    if (cov_core == 0) begin failures++; $display("no light-core exemption"); end
    if (cov_dec[0] == 0) begin failures++; $display("AEC never idle"); end
    if (cov_dec[1] == 0) begin failures++; $display("AEC never cut"); end
    if (cov_dec[2] == 0) begin failures++; $display("AEC never clamped"); end
    if (cov_dec[4] == 0) begin failures++; $display("AEC never both clamped and lifted"); end
    if (cov_dec[3] == 0) begin failures++; $display("AEC never lifted"); end
    if (cov_gain_change == 0) begin failures++; $display("gain never changed"); end
    if (cov_gaps == 0) begin failures++; $display("no input gaps"); end
    if (exp_rgb.size() != 0) begin failures++; $display("frames left unchecked"); end
    $display("mechanisms: halo %0d max %0d core %0d | AEC idle %0d cut %0d clamp %0d lift %0d both %0d | gain changes %0d | gaps %0d | frames %0d",
             cov_halo, cov_max, cov_core, cov_dec[0], cov_dec[1], cov_dec[2], cov_dec[3], cov_dec[4],
             cov_gain_change, cov_gaps, frames_out);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
