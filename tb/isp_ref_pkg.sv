// isp_ref_pkg: plain behavioural reference models of the pipeline stages, used
// by the testbenches to compute expected outputs independently of the RTL.
//
// Images are flat dynamic arrays indexed row*W + col. The models follow the
// arithmetic of the design specification directly (whole-frame loops, no
// beats, no line buffers, real-valued gamma), so an error in the RTL's
// streaming, alignment or border logic shows up as a mismatch.
package isp_ref_pkg;

  // colour of site (r,c): 0 R, 1 Gr, 2 Gb, 3 B; pattern 0 RGGB, 1 GRBG, 2 GBRG, 3 BGGR
  function automatic int cfa(int pat, int r, int c);
    int pos;
    int map [4][4] = '{'{0, 1, 2, 3}, '{1, 0, 3, 2}, '{2, 3, 0, 1}, '{3, 2, 1, 0}};
    pos = (r % 2) * 2 + (c % 2);
    return map[pat][pos];
  endfunction

  function automatic int clampi(int v, int lo, int hi);
    return (v < lo) ? lo : (v > hi) ? hi : v;
  endfunction

  // ---------------------------------------------------------------- stage 1
  // Returns the per-pixel local gain through lg[] as well, for coverage.
  function automatic void bloom_frame(input int raw[], input int W, input int H, input int pat,
                                      input int gain, input int core, input int blc[4],
                                      output int out[], output int lg[]);
    int lum[];
    lum = new[W * H];
    out = new[W * H];
    lg  = new[W * H];
    for (int r = 0; r < H; r++)
      for (int c = 0; c < W; c++) begin
        int src;
        int ch = cfa(pat, r, c);
        src = c;
        if (ch == 0 || ch == 3) src = ((c % 4) == 3) ? c - 1 : c + 1;
        lum[r*W + c] = raw[r*W + src] >> 2;
      end
    for (int r = 0; r < H; r++)
      for (int c = 0; c < W; c++) begin
        int vsum = 0;
        int bloom, raw8, excess, inv, t, gl, gc, d, y;
        for (int dr = -5; dr <= 5; dr++)
          for (int dc = -5; dc <= 5; dc++)
            vsum += lum[clampi(r + dr, 0, H - 1) * W + clampi(c + dc, 0, W - 1)];
        bloom  = (vsum * 542 + 32768) / 65536;
        raw8   = raw[r*W + c] >> 2;
        excess = (bloom > raw8) ? bloom - raw8 : 0;
        inv    = (core == 0) ? 131071 : 65536 / core;
        t      = (excess * inv) / 256;
        if (t > 256) t = 256;
        gl     = (raw8 > core) ? 64 : 64 - (32 * t) / 256;
        gc     = (gain * gl) / 64;
        d      = raw[r*W + c] - blc[cfa(pat, r, c)];
        if (d < 0) d = 0;
        y      = (d * gc) / 64;
        out[r*W + c] = (y > 1023) ? 1023 : y;
        lg[r*W + c]  = gl;
      end
  endfunction

  // ---------------------------------------------------------------- stage 2
  function automatic int mir(int v, int n);
    return (v < 0) ? -v : (v >= n) ? 2 * n - 2 - v : v;
  endfunction

  function automatic void demosaic_frame(input int raw[], input int W, input int H, input int pat,
                                         output int rr[], output int gg[], output int bb[]);
    rr = new[W * H];
    gg = new[W * H];
    bb = new[W * H];
    for (int r = 0; r < H; r++)
      for (int c = 0; c < W; c++) begin
        int n  = raw[mir(r - 1, H) * W + c];
        int s  = raw[mir(r + 1, H) * W + c];
        int w  = raw[r * W + mir(c - 1, W)];
        int e  = raw[r * W + mir(c + 1, W)];
        int d  = raw[mir(r - 1, H) * W + mir(c - 1, W)] + raw[mir(r - 1, H) * W + mir(c + 1, W)] +
                 raw[mir(r + 1, H) * W + mir(c - 1, W)] + raw[mir(r + 1, H) * W + mir(c + 1, W)];
        int own = raw[r * W + c];
        int a4e = (n + s + w + e + 2) / 4;
        int a4d = (d + 2) / 4;
        int a2h = (w + e + 1) / 2;
        int a2v = (n + s + 1) / 2;
        case (cfa(pat, r, c))
          0: begin rr[r*W+c] = own; gg[r*W+c] = a4e; bb[r*W+c] = a4d; end
          3: begin rr[r*W+c] = a4d; gg[r*W+c] = a4e; bb[r*W+c] = own; end
          1: begin rr[r*W+c] = a2h; gg[r*W+c] = own; bb[r*W+c] = a2v; end
          default: begin rr[r*W+c] = a2v; gg[r*W+c] = own; bb[r*W+c] = a2h; end
        endcase
        rr[r*W+c] >>= 2;
        gg[r*W+c] >>= 2;
        bb[r*W+c] >>= 2;
      end
  endfunction

  // ---------------------------------------------------------------- stage 3
  function automatic int awb_gamma(int x, int gain_q26, real gamma);
    int v = (x * gain_q26 + 32) / 64;
    if (v > 255) v = 255;
    return int'($floor(255.0 * ((real'(v) / 255.0) ** (1.0 / gamma)) + 0.5));
  endfunction

  // ---------------------------------------------------------------- AEC
  typedef struct {
    int gain;
    int core;
    int p02, p50, p98;
    int dec;       // 0 idle, 1 oe_cut, 2 clamp, 3 lift, 4 both
    int oe, ue;
  } aec_result_t;

  // One frame of the AEC decision, given the gain in force during the frame.
  function automatic aec_result_t aec_frame(input int raw[], input int W, input int H, input int pat,
                                            input int gain);
    aec_result_t res;
    int hist [256];
    int n = 0, oe = 0, ue = 0, cum = 0;
    int thr02, thr50, thr98, hl_safe, ue_lift, target, step, g;
    bit f02 = 0, f50 = 0, f98 = 0;
    foreach (hist[i]) hist[i] = 0;
    for (int r = 0; r < H; r++)
      for (int c = 0; c < W; c++) begin
        int v = raw[r*W + c];
        int ch = cfa(pat, r, c);
        if (ch == 1 || ch == 2) begin hist[v >> 2]++; n++; end
        if (v > 900) oe++;
        if (v < 64)  ue++;
      end
    thr02 = int'((longint'(n) * 1311) >> 16);
    thr50 = n >> 1;
    thr98 = int'((longint'(n) * 64225) >> 16);
    res.p02 = 255; res.p50 = 255; res.p98 = 255;
    for (int b = 0; b < 256; b++) begin
      cum += hist[b];
      if (!f02 && cum > thr02) begin res.p02 = b; f02 = 1; end
      if (!f50 && cum > thr50) begin res.p50 = b; f50 = 1; end
      if (!f98 && cum > thr98) begin res.p98 = b; f98 = 1; end
    end
    hl_safe = (res.p98 == 0) ? 65535 : (200 * 64) / res.p98;
    ue_lift = (res.p02 == 0) ? 65535 : (32 * 64) / res.p02;
    res.oe = oe;
    res.ue = ue;
    if (oe > (W * H) / 128) begin
      res.dec = 1; target = gain - gain / 4;
    end else if (((res.p98 * gain) >> 6) > 225 && ((res.p02 * gain) >> 6) <= 16) begin
      res.dec = 4; target = hl_safe;
    end else if (((res.p98 * gain) >> 6) > 225) begin
      res.dec = 2; target = hl_safe;
    end else if (((res.p02 * gain) >> 6) <= 16) begin
      res.dec = 3; target = (ue_lift < hl_safe) ? ue_lift : hl_safe;
    end else begin
      res.dec = 0; target = gain;
    end
    if (target > 1023) target = 1023;
    if (res.dec == 1) step = target - gain;
    else begin
      int diff = target - gain;
      step = (diff >= 0) ? (diff + 2) / 4 : -((-diff + 2) / 4);
      step = clampi(step, -2, 2);
    end
    g = clampi(gain + step, 16, 96);
    res.gain = g;
    res.core = (res.p98 * 200) / 256;
    return res;
  endfunction

endpackage
