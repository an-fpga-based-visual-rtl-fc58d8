// awb_gamma_lut: Stage 3 of the pipeline. White balance and gamma in one
// table lookup per colour channel.
//
// Each channel c has a 256-entry, 8-bit table
//     LUT_c[x] = G( min(255, round(x * g_c)) ),   G(v) = round(255 * (v/255)^(1/gamma))
// so one read applies the fixed white-balance gain g_c and the gamma curve at
// once. The design description fixes gamma = 1.6 and green as the reference
// channel (g_G = 1.0); the red and blue gains are parameters in Q2.6. The
// tables are computed at elaboration with integer arithmetic only:
// G(v) is the largest y with (2y-1)^N <= 2^N * v^D * 255^(N-D), gamma = N/D,
// i.e. the exactly rounded power law, so no data file is needed.
// Four lanes each hold their own three tables (12 reads per beat).
//
// Register stages: S0 input (unpack), S1 table read, S2 hold, S3 output
// (pack): 4 cycles from input to output, fixed.
// Interface: 96-bit beat in and out, pixel i = {R,G,B} in bits [24i+23:24i];
// sof/eol/eof flags pass through with the data; no backpressure.
module awb_gamma_lut
  import isp_pkg::*;
#(
  parameter logic [7:0]  GAIN_R    = 8'd124,  // Q2.6, 1.938x
  parameter logic [7:0]  GAIN_G    = 8'd64,   // Q2.6, 1.0x (reference)
  parameter logic [7:0]  GAIN_B    = 8'd100,  // Q2.6, 1.563x
  parameter int unsigned GAMMA_NUM = 8,       // gamma = GAMMA_NUM / GAMMA_DEN = 1.6
  parameter int unsigned GAMMA_DEN = 5
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  input  frame_flags_t in_flags,
  input  rgb_beat_t    in_data,
  output logic         out_valid,
  output frame_flags_t out_flags,
  output rgb_beat_t    out_data
);

  function automatic logic [127:0] ipow(logic [127:0] b, int unsigned e);
    logic [127:0] r;
    r = 128'd1;
    for (int unsigned i = 0; i < e; i++) r = r * b;
    return r;
  endfunction

  // AWB gain with rounding and saturation, then the gamma curve.
  function automatic logic [7:0] lut_entry(int unsigned x, logic [7:0] gain);
    logic [127:0] rhs;
    int unsigned  v, lo, hi, mid;
    v   = (x * gain + 32) >> 6;
    if (v > 255) v = 255;
    rhs = ipow(128'd2, GAMMA_NUM) * ipow(128'(v), GAMMA_DEN) * ipow(128'd255, GAMMA_NUM - GAMMA_DEN);
    lo  = 0;    // largest y known to satisfy (2y-1)^N <= rhs
    hi  = 255;
    while (lo < hi) begin
      mid = (lo + hi + 1) / 2;
      if (ipow(128'(2 * mid - 1), GAMMA_NUM) <= rhs) lo = mid;
      else                                          hi = mid - 1;
    end
    return 8'(lo);
  endfunction

  logic [7:0] lut_r [256];
  logic [7:0] lut_g [256];
  logic [7:0] lut_b [256];

  for (genvar i = 0; i < 256; i++) begin : g_rom
    localparam logic [7:0] VR = lut_entry(i, GAIN_R);
    localparam logic [7:0] VG = lut_entry(i, GAIN_G);
    localparam logic [7:0] VB = lut_entry(i, GAIN_B);
    assign lut_r[i] = VR;
    assign lut_g[i] = VG;
    assign lut_b[i] = VB;
  end

  logic [3:0]         v_q;
  frame_flags_t [3:0] fl_q;
  rgb_beat_t          s0_d, s1_d, s2_d;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) v_q <= '0;
    else        v_q <= {v_q[2:0], in_valid};
  end

  always_ff @(posedge clk) begin
    fl_q <= {fl_q[2:0], in_flags};
    s0_d <= in_data;
    for (int p = 0; p < PPC; p++) begin
      s1_d[p*24 + 16 +: 8] <= lut_r[s0_d[p*24 + 16 +: 8]];
      s1_d[p*24 +  8 +: 8] <= lut_g[s0_d[p*24 +  8 +: 8]];
      s1_d[p*24      +: 8] <= lut_b[s0_d[p*24      +: 8]];
    end
    s2_d     <= s1_d;
    out_data <= s2_d;
  end

  assign out_valid = v_q[3];
  assign out_flags = fl_q[3];

endmodule
