// bloom_affine: Stage 1 of the pipeline. Bayer-domain bloom suppression fused
// with the global exposure gain and black-level correction.
//
// For every RAW pixel the stage estimates the mean brightness of its 11x11
// neighbourhood. Where the neighbourhood is brighter than the pixel itself the
// pixel lies in the halo around a strong light, and a local gain between 1.0x
// and 0.5x is chosen by how much brighter it is, normalised to a scene-adaptive
// threshold ("bloom core") from the AEC side channel. The local gain is
// multiplied with the AEC global gain, and the pixel is corrected in a single
// multiply: out = clamp(((raw - black) * g_combined) >> 6, 0, 1023). Because
// this happens before demosaicing, halo energy is reduced before interpolation
// can spread it into neighbouring colour sites.
//
// Nine register stages, as in the design description:
//   S0  green fill: each non-green site borrows the nearest green of its beat;
//       luminance is that green >> 2 (8 bit).
//   S1  shift register of 5 beats (20 luminance values): the 11-tap window of
//       the beat two beats back is complete.
//   S2  horizontal 11-tap sums, 4 per beat; line-buffer read.
//   S3  vertical sum over 11 rows of horizontal sums (10 stored lines) and the
//       RAW pixel delayed by 5 lines (5 stored lines).
//   S4A bloom = (vsum*542 + 32768) >> 16 (divide by 121); excess = max(0, bloom - raw>>2)
//   S4B t = min(256, (excess * (65536/core)) >> 8), 65536/core from a ROM
//   S4C g_local = 64 - ((32*t) >> 8), or 64 when raw>>2 > core (light core itself)
//   S5A g_combined = (g_global * g_local) >> 6
//   S5B affine output with black level and clamp
// Gains are Q2.6. Frame borders replicate the edge pixel (this design's choice).
// global_gain and bloom_core are sampled when the first pixel of a frame
// reaches S4A and held for the whole frame, so a gain update made during
// vertical blanking never splits a frame.
//
// Interface: 4 pixels per beat, 10 bits each, pixel 0 leftmost; sof/eol/eof
// flags; no backpressure. Output: same format, same flags.
// Timing: pixel (r,c) leaves 5 lines + 2 beats + 9 cycles after it entered
// when the input has no gaps inside a frame (the 2 beats are the right-hand
// half of the 11-pixel window). After eof the stage runs 5 lines + 2 beats of
// flush, so vertical blanking must be at least that long.
module bloom_affine
  import isp_pkg::*;
#(
  parameter int unsigned WIDTH  = 1920,
  parameter int unsigned HEIGHT = 1080,
  parameter bayer_e      BAYER  = BAYER_RGGB
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  input  frame_flags_t        in_flags,
  input  raw_beat_t           in_data,
  input  logic [GAIN_W-1:0]   global_gain,   // Q2.6 from the AEC side channel
  input  logic [7:0]          bloom_core,    // p98*200/256 from the AEC side channel
  input  logic [3:0][RAW_W-1:0] blc_offset,  // black level per CFA channel (index cfa_e)
  output logic                out_valid,
  output frame_flags_t        out_flags,
  output raw_beat_t           out_data
);

  localparam int unsigned BPL    = WIDTH / PPC;
  localparam int unsigned RAD    = 5;            // window radius
  localparam int unsigned LA     = 2;            // beats of horizontal look-ahead
  localparam int unsigned NLB    = 2 * RAD;      // stored lines of horizontal sums
  localparam int unsigned HS_W   = 12;           // 11 * 255 < 4096
  localparam int unsigned VS_W   = 15;           // 121 * 255 < 32768
  localparam int unsigned ROW_W  = 16;
  localparam int unsigned COL_W  = $clog2(BPL + 1);
  localparam int unsigned SR_N   = (2 * LA + 1) * PPC;   // 20 luminance values

  // ---------------------------------------------------------------- entry
  logic             adv, flushing;
  logic [ROW_W-1:0] e_row;
  logic [COL_W-1:0] e_col;

  raster_tracker #(.BPL(BPL), .FLUSH_BEATS(RAD * BPL + LA), .ROW_W(ROW_W), .COL_W(COL_W))
    u_rt (.clk, .rst_n, .in_valid, .in_sof(in_flags.sof), .in_eof(in_flags.eof),
          .adv, .flushing, .row(e_row), .col(e_col));

  // ---------------------------------------------------------------- S0
  logic                  s0_v;
  logic [ROW_W-1:0]      s0_row;
  logic [COL_W-1:0]      s0_col;
  raw_beat_t             s0_raw;
  logic [PPC-1:0][7:0]   s0_lum;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) s0_v <= 1'b0;
    else        s0_v <= adv;
  end

  always_ff @(posedge clk) begin
    if (adv) begin
      s0_row <= e_row;
      s0_col <= e_col;
      s0_raw <= flushing ? '0 : in_data;
      for (int p = 0; p < PPC; p++) begin
        // nearest green in the same beat: right neighbour, or left one for pixel 3
        automatic int src = is_green(cfa_at(BAYER, e_row[0], 1'(p))) ? p :
                            (p < PPC - 1) ? p + 1 : p - 1;
        s0_lum[p] <= flushing ? 8'd0 : in_data[src*RAW_W + 2 +: 8];
      end
    end
  end

  // ---------------------------------------------------------------- S1
  logic [SR_N-1:0][7:0]     lum_sr;   // element 0 = leftmost (oldest) pixel
  raw_beat_t [LA:0]         raw_sr;   // element 0 = oldest beat
  logic                     s1_v;
  logic signed [ROW_W:0]    s1_row;   // row of the window-centre beat (may be -1)
  logic [COL_W-1:0]         s1_col;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) s1_v <= 1'b0;
    else        s1_v <= s0_v;
  end

  always_ff @(posedge clk) begin
    if (s0_v) begin
      lum_sr <= {s0_lum, lum_sr[SR_N-1:PPC]};
      raw_sr <= {s0_raw, raw_sr[LA:1]};
      if (s0_col >= COL_W'(LA)) begin
        s1_row <= $signed({1'b0, s0_row});
        s1_col <= s0_col - COL_W'(LA);
      end else begin
        s1_row <= $signed({1'b0, s0_row}) - 1;
        s1_col <= s0_col + COL_W'(BPL - LA);
      end
    end
  end

  // ---------------------------------------------------------------- S2
  // Window element j holds column 4*s1_col - 8 + j. Columns outside the frame
  // take the edge pixel, which is always inside the window.
  logic [PPC-1:0][HS_W-1:0] hsum_c;
  always_comb begin
    for (int p = 0; p < PPC; p++) begin
      hsum_c[p] = '0;
      for (int k = -int'(RAD); k <= int'(RAD); k++) begin
        automatic int x = int'(s1_col) * PPC + p + k;
        automatic int j;
        if (x < 0) x = 0;
        if (x > int'(WIDTH) - 1) x = int'(WIDTH) - 1;
        j = x - int'(s1_col) * PPC + LA * PPC;
        hsum_c[p] = hsum_c[p] + HS_W'(lum_sr[j]);
      end
    end
  end

  logic                         s2_v;
  logic signed [ROW_W:0]        s2_row;
  logic [COL_W-1:0]             s2_col;
  logic [PPC-1:0][HS_W-1:0]     s2_hsum;
  raw_beat_t                    s2_raw;

  // line buffers: word holds the NLB previous lines of horizontal sums
  // (slot 0 = newest) and the RAD previous lines of RAW beats
  logic [NLB-1:0][PPC-1:0][HS_W-1:0] hs_mem [BPL];
  raw_beat_t [RAD-1:0]               rw_mem [BPL];
  logic [NLB-1:0][PPC-1:0][HS_W-1:0] hs_rd;
  raw_beat_t [RAD-1:0]               rw_rd;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) s2_v <= 1'b0;
    else        s2_v <= s1_v;
  end

  always_ff @(posedge clk) begin
    if (s1_v) begin
      s2_row  <= s1_row;
      s2_col  <= s1_col;
      s2_hsum <= hsum_c;
      s2_raw  <= raw_sr[0];
      hs_rd   <= hs_mem[s1_col];
      rw_rd   <= rw_mem[s1_col];
    end
    if (s2_v) begin
      hs_mem[s2_col] <= {hs_rd[NLB-2:0], s2_hsum};
      rw_mem[s2_col] <= {rw_rd[RAD-2:0], s2_raw};
    end
  end

  // ---------------------------------------------------------------- S3
  // Row tap i (0..10) is line s2_row-10+i; tap 10 is the line arriving now.
  // Output row is s2_row-5; taps above row 0 or below the last row are replaced
  // by the edge row.
  logic signed [ROW_W:0]      s2_orow;
  logic                       s2_out_ok;
  logic [PPC-1:0][VS_W-1:0]   vsum_c;
  always_comb begin
    automatic int hr = int'(s2_row);
    automatic int lo = 2 * int'(RAD) - hr;                  // first in-frame tap
    automatic int hi = int'(HEIGHT) - 1 - hr + 2 * int'(RAD); // last in-frame tap
    s2_orow   = s2_row - (ROW_W+1)'(RAD);
    s2_out_ok = (s2_orow >= 0) && (s2_orow < (ROW_W+1)'(HEIGHT));
    for (int p = 0; p < PPC; p++) begin
      vsum_c[p] = '0;
      for (int i = 0; i <= 2 * int'(RAD); i++) begin
        automatic int src = i;
        if (src < lo) src = lo;
        if (src > hi) src = hi;
        if (src >= 2 * int'(RAD)) vsum_c[p] = vsum_c[p] + VS_W'(s2_hsum[p]);
        else if (src >= 0)        vsum_c[p] = vsum_c[p] + VS_W'(hs_rd[2*RAD-1-src][p]);
      end
    end
  end

  logic                     s3_v;
  frame_flags_t             s3_fl;
  logic [PPC-1:0][VS_W-1:0] s3_vsum;
  raw_beat_t                s3_raw;
  logic                     s3_odd;   // output row parity

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) s3_v <= 1'b0;
    else        s3_v <= s2_v && s2_out_ok;
  end

  always_ff @(posedge clk) begin
    if (s2_v) begin
      s3_vsum   <= vsum_c;
      s3_raw    <= rw_rd[RAD-1];
      s3_odd    <= s2_orow[0];
      s3_fl.sof <= (s2_orow == 0) && (s2_col == 0);
      s3_fl.eol <= (s2_col == COL_W'(BPL - 1));
      s3_fl.eof <= (s2_orow == (ROW_W+1)'(HEIGHT - 1)) && (s2_col == COL_W'(BPL - 1));
    end
  end

  // ---------------------------------------------------------------- S4A
  logic [GAIN_W-1:0] gain_hold;
  logic [7:0]        core_hold;
  logic [GAIN_W-1:0] gain_frame;
  logic [7:0]        core_frame;
  assign gain_frame = s3_fl.sof ? global_gain : gain_hold;
  assign core_frame = s3_fl.sof ? bloom_core  : core_hold;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      gain_hold <= GAIN_W'(GAIN_ONE);
      core_hold <= 8'd255;
    end else if (s3_v && s3_fl.sof) begin
      gain_hold <= global_gain;
      core_hold <= bloom_core;
    end
  end

  logic                  s4a_v, s4b_v, s4c_v, s5a_v;
  frame_flags_t          s4a_fl, s4b_fl, s4c_fl, s5a_fl;
  raw_beat_t             s4a_raw, s4b_raw, s4c_raw, s5a_raw;
  logic                  s4a_odd, s4b_odd, s4c_odd, s5a_odd;
  logic [GAIN_W-1:0]     s4a_gg, s4b_gg, s4c_gg;
  logic [7:0]            s4a_core;
  logic [PPC-1:0][7:0]   s4a_exc;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) {s4a_v, s4b_v, s4c_v, s5a_v} <= '0;
    else        {s4a_v, s4b_v, s4c_v, s5a_v} <= {s3_v, s4a_v, s4b_v, s4c_v};
  end

  always_ff @(posedge clk) begin
    if (s3_v) begin
      s4a_fl   <= s3_fl;
      s4a_raw  <= s3_raw;
      s4a_odd  <= s3_odd;
      s4a_gg   <= gain_frame;
      s4a_core <= core_frame;
      for (int p = 0; p < PPC; p++) begin
        automatic logic [24:0] prod  = 25'(s3_vsum[p]) * 25'd542 + 25'd32768;
        automatic logic [7:0]  bloom = prod[23:16];
        automatic logic [7:0]  raw8  = s3_raw[p*RAW_W + 2 +: 8];
        s4a_exc[p] <= (bloom > raw8) ? bloom - raw8 : 8'd0;
      end
    end
  end

  // ---------------------------------------------------------------- S4B
  // 65536/core as a ROM; core = 0 saturates to the largest entry.
  function automatic logic [16:0] inv_core_rom(logic [7:0] core);
    return (core == 8'd0) ? 17'h1FFFF : 17'(32'd65536 / 32'(core));
  endfunction

  logic [PPC-1:0][8:0] s4b_t;
  logic [PPC-1:0]      s4b_incore;

  always_ff @(posedge clk) begin
    if (s4a_v) begin
      s4b_fl  <= s4a_fl;
      s4b_raw <= s4a_raw;
      s4b_odd <= s4a_odd;
      s4b_gg  <= s4a_gg;
      for (int p = 0; p < PPC; p++) begin
        automatic logic [24:0] tt = (25'(s4a_exc[p]) * 25'(inv_core_rom(s4a_core))) >> 8;
        s4b_t[p]      <= (tt > 25'd256) ? 9'd256 : tt[8:0];
        s4b_incore[p] <= (s4a_raw[p*RAW_W + 2 +: 8] > s4a_core);
      end
    end
  end

  // ---------------------------------------------------------------- S4C
  localparam logic [6:0] G_DARK = 7'd64;   // 1.0x
  localparam logic [6:0] G_HALO = 7'd32;   // 0.5x
  logic [PPC-1:0][6:0] s4c_gl;

  always_ff @(posedge clk) begin
    if (s4b_v) begin
      s4c_fl  <= s4b_fl;
      s4c_raw <= s4b_raw;
      s4c_odd <= s4b_odd;
      s4c_gg  <= s4b_gg;
      for (int p = 0; p < PPC; p++) begin
        automatic logic [15:0] dec = (16'(G_DARK - G_HALO) * 16'(s4b_t[p])) >> 8;
        s4c_gl[p] <= s4b_incore[p] ? G_DARK : G_DARK - dec[6:0];
      end
    end
  end

  // ---------------------------------------------------------------- S5A
  logic [PPC-1:0][GAIN_W-1:0] s5a_gc;

  always_ff @(posedge clk) begin
    if (s4c_v) begin
      s5a_fl  <= s4c_fl;
      s5a_raw <= s4c_raw;
      s5a_odd <= s4c_odd;
      for (int p = 0; p < PPC; p++) begin
        automatic logic [14:0] prod = 15'(s4c_gg) * 15'(s4c_gl[p]);
        s5a_gc[p] <= prod[13:6];
      end
    end
  end

  // ---------------------------------------------------------------- S5B
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= s5a_v;
  end

  always_ff @(posedge clk) begin
    if (s5a_v) begin
      out_flags <= s5a_fl;
      for (int p = 0; p < PPC; p++) begin
        automatic cfa_e                ch  = cfa_at(BAYER, s5a_odd, 1'(p));
        automatic logic [RAW_W-1:0]    px  = s5a_raw[p*RAW_W +: RAW_W];
        automatic logic [RAW_W-1:0]    blk = blc_offset[ch];
        automatic logic [RAW_W-1:0]    d   = (px > blk) ? px - blk : '0;
        automatic logic [17:0]         y   = (18'(d) * 18'(s5a_gc[p])) >> 6;
        out_data[p*RAW_W +: RAW_W] <= (y > 18'd1023) ? 10'd1023 : y[RAW_W-1:0];
      end
    end
  end

endmodule
