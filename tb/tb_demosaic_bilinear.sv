// tb_demosaic_bilinear: self-checking test of Stage 2 (demosaic_bilinear).
//
// Two instances, one RGGB and one GBRG, receive the same random 16x8 RAW
// frames: first without gaps (latency of 1 line + 1 beat + 5 cycles checked),
// then with random idle cycles inside the frame. Every R, G and B value, the
// zero pad byte and the frame flags are compared with the whole-frame
// reference model, including the mirrored borders.
module tb_demosaic_bilinear;
  import isp_pkg::*;
  import isp_ref_pkg::*;

  localparam int W = 16, H = 8, BPL = W / 4;

  logic clk = 0, rst_n = 0;
  logic in_valid = 0;
  frame_flags_t in_flags = '0;
  raw_beat_t in_data = '0;
  logic [1:0] out_valid;
  frame_flags_t out_flags [2];
  rgbx_beat_t out_data [2];

  demosaic_bilinear #(.WIDTH(W), .HEIGHT(H), .BAYER(BAYER_RGGB)) dut0 (
    .clk, .rst_n, .in_valid, .in_flags, .in_data,
    .out_valid(out_valid[0]), .out_flags(out_flags[0]), .out_data(out_data[0]));
  demosaic_bilinear #(.WIDTH(W), .HEIGHT(H), .BAYER(BAYER_GBRG)) dut1 (
    .clk, .rst_n, .in_valid, .in_flags, .in_data,
    .out_valid(out_valid[1]), .out_flags(out_flags[1]), .out_data(out_data[1]));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cyc = 0;
  int t_in = -1, t_out = -1;
  int img[];
  int er [2][], eg [2][], eb [2][];
  int n_out [2] = '{0, 0};

  always @(posedge clk) cyc <= cyc + 1;

  always @(posedge clk) begin
    if (in_valid && in_flags.sof && t_in < 0) t_in = cyc;
    for (int k = 0; k < 2; k++) begin
      if (out_valid[k] && rst_n) begin
        int r, b;
        r = n_out[k] / BPL;
        b = n_out[k] % BPL;
        if (k == 0 && out_flags[0].sof && t_out < 0) t_out = cyc;
        checks++;
        if (out_flags[k].sof != (n_out[k] == 0) || out_flags[k].eol != (b == BPL - 1) ||
            out_flags[k].eof != (n_out[k] == W * H / 4 - 1)) begin
          failures++;
          $display("dut%0d flag mismatch at beat %0d", k, n_out[k]);
        end
        for (int p = 0; p < 4; p++) begin
          int i;
          logic [31:0] got, e;
          i = r * W + b * 4 + p;
          got = out_data[k][p*32 +: 32];
          e = {8'h00, 8'(er[k][i]), 8'(eg[k][i]), 8'(eb[k][i])};
          checks++;
          if (got !== e) begin
            failures++;
            if (failures < 10) $display("dut%0d (%0d,%0d): got %h expected %h", k, r, b*4+p, got, e);
          end
        end
        n_out[k]++;
      end
    end
  end

  task automatic send_frame(bit gaps);
    for (int r = 0; r < H; r++)
      for (int b = 0; b < BPL; b++) begin
        while (gaps && ($urandom_range(0, 2) == 0)) begin
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

  task automatic run_frame(bit gaps);
    img = new[W * H];
    foreach (img[i]) img[i] = int'($urandom_range(0, 1023));
    demosaic_frame(img, W, H, 0, er[0], eg[0], eb[0]);
    demosaic_frame(img, W, H, 2, er[1], eg[1], eb[1]);
    n_out = '{0, 0};
    send_frame(gaps);
    repeat (BPL + 20) @(posedge clk);
    for (int k = 0; k < 2; k++) begin
      checks++;
      if (n_out[k] != W * H / 4) begin
        failures++;
        $display("dut%0d produced %0d beats, expected %0d", k, n_out[k], W * H / 4);
      end
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (2) @(posedge clk);
    run_frame(0);
    checks++;
    if (t_out - t_in != BPL + 1 + 5) begin
      failures++;
      $display("latency %0d cycles, expected %0d", t_out - t_in, BPL + 1 + 5);
    end
    run_frame(1);
    run_frame(1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
