// tb_aec_side_channel: self-checking test of the AEC side channel.
//
// 36 frames of 32x8 RAW pixels with scripted brightness drive the controller
// through every decision: mid-grey frames (IDLE), dark frames that lift the
// gain up to its 1.5x bound (LIFT), bright frames at high gain (CLAMP), frames
// that are both too bright and too dark (BOTH) and frames with many saturated
// pixels that cut the gain down to its 0.25x bound (OE_CUT). After every frame
// the percentiles, counters, decision, global gain and bloom core are compared
// with the reference model; the update must come within 330 cycles of the
// frame's last beat. Each decision, a slew-limited step and both gain bounds
// must occur at least once.
module tb_aec_side_channel;
  import isp_pkg::*;
  import isp_ref_pkg::*;

  localparam int W = 32, H = 8, BPL = W / 4;

  logic clk = 0, rst_n = 0;
  logic in_valid = 0;
  frame_flags_t in_flags = '0;
  raw_beat_t in_data = '0;
  logic [7:0] global_gain, bloom_core, p02, p50, p98;
  logic [21:0] oe_count, ue_count;
  logic [2:0] decision;
  logic update;

  aec_side_channel #(.WIDTH(W), .HEIGHT(H), .BAYER(BAYER_RGGB)) dut (
    .clk, .rst_n, .in_valid, .in_flags, .in_data, .global_gain, .bloom_core,
    .p02, .p50, .p98, .oe_count, .ue_count, .decision, .update);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cyc = 0;
  int img[];
  int model_gain = 64;
  int cov_dec [5] = '{0, 0, 0, 0, 0};
  int cov_slew = 0, cov_max = 0, cov_min = 0;

  always @(posedge clk) cyc <= cyc + 1;

  task automatic make_frame(int lo, int hi, int n_sat);
    img = new[W * H];
    foreach (img[i]) img[i] = int'($urandom_range(lo, hi));
    for (int i = 0; i < n_sat; i++) img[$urandom_range(0, W * H - 1)] = 1023;
  endtask

  task automatic check(string what, int got, int e);
    checks++;
    if (got != e) begin
      failures++;
      $display("%s: got %0d expected %0d", what, got, e);
    end
  endtask

  task automatic run_frame(int lo, int hi, int n_sat);
    aec_result_t m;
    int t_eof, prev;
    make_frame(lo, hi, n_sat);
    m = aec_frame(img, W, H, 0, model_gain);
    for (int r = 0; r < H; r++)
      for (int b = 0; b < BPL; b++) begin
        in_valid <= 1;
        in_flags.sof <= (r == 0 && b == 0);
        in_flags.eol <= (b == BPL - 1);
        in_flags.eof <= (r == H - 1 && b == BPL - 1);
        for (int p = 0; p < 4; p++) in_data[p*10 +: 10] <= 10'(img[r * W + b * 4 + p]);
        @(posedge clk);
      end
    in_valid <= 0;
    in_flags <= '0;
    t_eof = cyc;
    while (!update && cyc - t_eof < 400) @(posedge clk);
    checks++;
    if (!update || cyc - t_eof > 330) begin
      failures++;
      $display("update after %0d cycles", cyc - t_eof);
    end
    @(negedge clk);
    check("p02", p02, m.p02);
    check("p50", p50, m.p50);
    check("p98", p98, m.p98);
    check("oe_count", oe_count, m.oe);
    check("ue_count", ue_count, m.ue);
    check("decision", decision, m.dec);
    check("global_gain", global_gain, m.gain);
    check("bloom_core", bloom_core, m.core);
    prev = model_gain;
    model_gain = m.gain;
    cov_dec[m.dec]++;
    if (m.dec != 1 && (m.gain - prev == 2 || m.gain - prev == -2)) cov_slew++;
    if (m.gain == 96) cov_max++;
    if (m.gain == 16) cov_min++;
    repeat (60) @(posedge clk);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (300) @(posedge clk);            // histogram clear sweep
    repeat (3)  run_frame(300, 700, 0);     // idle
    repeat (20) run_frame(0, 400, 0);       // lift, up to the 1.5x bound
    repeat (3)  run_frame(500, 800, 0);     // clamp at high gain
    repeat (2)  run_frame(0, 800, 0);       // both
    repeat (6)  run_frame(200, 600, 40);    // over-exposure cut down to 0.25x
    repeat (2)  run_frame(300, 700, 0);     // idle
    checks += 8;
    foreach (cov_dec[i])
      if (cov_dec[i] == 0) begin failures++; $display("decision %0d never taken", i); end
    if (cov_slew == 0) begin failures++; $display("slew limit never reached"); end
    if (cov_max == 0)  begin failures++; $display("upper gain bound never reached"); end
    if (cov_min == 0)  begin failures++; $display("lower gain bound never reached"); end
    $display("decisions idle/oe/clamp/lift/both: %0d %0d %0d %0d %0d, slew %0d, max %0d, min %0d",
             cov_dec[0], cov_dec[1], cov_dec[2], cov_dec[3], cov_dec[4], cov_slew, cov_max, cov_min);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
