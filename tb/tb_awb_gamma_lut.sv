// tb_awb_gamma_lut: self-checking test of Stage 3 (awb_gamma_lut).
//
// Two instances: the default one (R 1.938x, G 1.0x, B 1.563x, gamma 1.6) and
// one with other gains and gamma 2.2. Every 8-bit code is sent on every
// channel and lane, followed by random beats with idle cycles between them.
// Each output is compared with 255*(min(255, x*g)/255)^(1/gamma) evaluated in
// floating point; the 4-cycle latency and the flag pass-through are checked.
module tb_awb_gamma_lut;
  import isp_pkg::*;
  import isp_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  logic in_valid = 0;
  frame_flags_t in_flags = '0;
  rgb_beat_t in_data = '0;
  logic [1:0] out_valid;
  frame_flags_t out_flags [2];
  rgb_beat_t out_data [2];

  awb_gamma_lut dut0 (
    .clk, .rst_n, .in_valid, .in_flags, .in_data,
    .out_valid(out_valid[0]), .out_flags(out_flags[0]), .out_data(out_data[0]));
  awb_gamma_lut #(.GAIN_R(8'd80), .GAIN_G(8'd70), .GAIN_B(8'd140), .GAMMA_NUM(11), .GAMMA_DEN(5)) dut1 (
    .clk, .rst_n, .in_valid, .in_flags, .in_data,
    .out_valid(out_valid[1]), .out_flags(out_flags[1]), .out_data(out_data[1]));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cyc = 0;
  rgb_beat_t     sent_d [$];
  frame_flags_t  sent_f [$];
  int            sent_t [$];
  int            gains [2][3] = '{'{124, 64, 100}, '{80, 70, 140}};
  real           gam [2] = '{1.6, 2.2};

  always @(posedge clk) cyc <= cyc + 1;

  always @(posedge clk) begin
    if (in_valid) begin
      sent_d.push_back(in_data);
      sent_f.push_back(in_flags);
      sent_t.push_back(cyc);
    end
    if (rst_n && out_valid[0] != out_valid[1]) begin
      failures++;
      $display("valid mismatch between instances");
    end
    if (out_valid[0] && rst_n) begin
      rgb_beat_t d;
      frame_flags_t f;
      int t;
      d = sent_d.pop_front();
      f = sent_f.pop_front();
      t = sent_t.pop_front();
      checks++;
      if (cyc - t != 4) begin
        failures++;
        $display("latency %0d, expected 4", cyc - t);
      end
      for (int k = 0; k < 2; k++) begin
        checks++;
        if (out_flags[k] != f) begin failures++; $display("flags differ"); end
        for (int p = 0; p < 4; p++)
          for (int ch = 0; ch < 3; ch++) begin
            int x, e, got;
            x = int'(d[p*24 + (2 - ch)*8 +: 8]);
            e = awb_gamma(x, gains[k][ch], gam[k]);
            got = int'(out_data[k][p*24 + (2 - ch)*8 +: 8]);
            checks++;
            if (got != e) begin
              failures++;
              if (failures < 10) $display("dut%0d ch%0d x=%0d: got %0d expected %0d", k, ch, x, got, e);
            end
          end
      end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (2) @(posedge clk);
    for (int x = 0; x < 256; x += 4) begin
      in_valid <= 1;
      in_flags <= frame_flags_t'({x == 0, (x % 16) == 12, x == 252});
      for (int p = 0; p < 4; p++)
        in_data[p*24 +: 24] <= {8'(x + p), 8'(255 - x - p), 8'(x + p)};
      @(posedge clk);
    end
    for (int i = 0; i < 200; i++) begin
      in_valid <= ($urandom_range(0, 3) != 0);
      in_flags <= frame_flags_t'(3'($urandom_range(0, 7)));
      in_data  <= {$urandom(), $urandom(), $urandom()};
      @(posedge clk);
    end
    in_valid <= 0;
    repeat (10) @(posedge clk);
    checks++;
    if (sent_d.size() != 0) begin
      failures++;
      $display("%0d beats never came out", sent_d.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
