// isp_top: front-end image signal processor for a Bayer RAW camera, pruned
// to what downstream perception networks need and arranged so that strong
// light sources are suppressed before demosaicing can spread them.
//
// Data path, four pixels per clock, no backpressure, fixed latency:
//   Stage 1  bloom_affine       black level, global AEC gain and local bloom
//                               suppression in one Bayer-domain multiply
//   Stage 2  demosaic_bilinear  3x3 bilinear interpolation to RGB
//            format bridge      one register, 128-bit {00,R,G,B} x4 -> 96-bit RGB x4
//   Stage 3  awb_gamma_lut      white balance and gamma 1.6 in one lookup per channel
// Side channel: aec_side_channel taps the RAW input, and during vertical
// blanking computes the global gain and the bloom-core threshold used by
// Stage 1 for the next frame (one frame of control delay, no data-path cost).
//
// Interface: RAW beats of 4 x 10 bits (pixel 0 leftmost, bits [9:0]) with
// sof/eol/eof flags; RGB beats of 4 x 24 bits ({R,G,B}, pixel 0 in [23:0]).
// blc_offset holds the black level of each CFA channel (R, Gr, Gb, B); the
// AEC state is brought out for monitoring.
// Latency for gap-free input lines: 6 lines + 3 beats + 19 cycles
// (Stage 1: 5 lines + 2 beats + 9, Stage 2: 1 line + 1 beat + 5, bridge 1,
// Stage 3: 4). Vertical blanking must last at least 5 lines + 2 beats so the
// window stages can flush; the AEC update (about 300 cycles) fits inside it.
// The stage order, the four-pixel beat, the stage depths (9, 5, bridge, 4),
// the Bayer-domain gain and the side channel follow the design description;
// the flag-based stream format, the flush and the resulting extra 3 beats of
// latency over the described 6 lines + 15 cycles are this design's choices.
module isp_top
  import isp_pkg::*;
#(
  parameter int unsigned WIDTH  = 1920,
  parameter int unsigned HEIGHT = 1080,
  parameter bayer_e      BAYER  = BAYER_RGGB,
  parameter logic [7:0]  AWB_GAIN_R = 8'd124,   // Q2.6
  parameter logic [7:0]  AWB_GAIN_B = 8'd100    // Q2.6
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  in_valid,
  input  frame_flags_t          in_flags,
  input  raw_beat_t             in_data,
  input  logic [3:0][RAW_W-1:0] blc_offset,
  output logic                  out_valid,
  output frame_flags_t          out_flags,
  output rgb_beat_t             out_data,
  output logic [GAIN_W-1:0]     aec_gain,
  output logic [7:0]            aec_bloom_core,
  output logic [7:0]            aec_p02,
  output logic [7:0]            aec_p50,
  output logic [7:0]            aec_p98,
  output logic [21:0]           aec_oe_count,
  output logic [21:0]           aec_ue_count,
  output logic [2:0]            aec_decision,
  output logic                  aec_update
);

  // ------------------------------------------------------------ AEC side channel
  aec_side_channel #(.WIDTH(WIDTH), .HEIGHT(HEIGHT), .BAYER(BAYER)) u_aec (
    .clk, .rst_n,
    .in_valid, .in_flags, .in_data,
    .global_gain (aec_gain),
    .bloom_core  (aec_bloom_core),
    .p02 (aec_p02), .p50 (aec_p50), .p98 (aec_p98),
    .oe_count (aec_oe_count), .ue_count (aec_ue_count),
    .decision (aec_decision), .update (aec_update)
  );

  // ------------------------------------------------------------ Stage 1
  logic         s1_valid;
  frame_flags_t s1_flags;
  raw_beat_t    s1_data;

  bloom_affine #(.WIDTH(WIDTH), .HEIGHT(HEIGHT), .BAYER(BAYER)) u_stage1 (
    .clk, .rst_n,
    .in_valid, .in_flags, .in_data,
    .global_gain (aec_gain),
    .bloom_core  (aec_bloom_core),
    .blc_offset,
    .out_valid (s1_valid), .out_flags (s1_flags), .out_data (s1_data)
  );

  // ------------------------------------------------------------ Stage 2
  logic         s2_valid;
  frame_flags_t s2_flags;
  rgbx_beat_t   s2_data;

  demosaic_bilinear #(.WIDTH(WIDTH), .HEIGHT(HEIGHT), .BAYER(BAYER)) u_stage2 (
    .clk, .rst_n,
    .in_valid (s1_valid), .in_flags (s1_flags), .in_data (s1_data),
    .out_valid (s2_valid), .out_flags (s2_flags), .out_data (s2_data)
  );

  // ------------------------------------------------------------ format bridge
  logic         br_valid;
  frame_flags_t br_flags;
  rgb_beat_t    br_data;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) br_valid <= 1'b0;
    else        br_valid <= s2_valid;
  end

  always_ff @(posedge clk) begin
    br_flags <= s2_flags;
    for (int p = 0; p < PPC; p++)
      br_data[p*24 +: 24] <= s2_data[p*32 +: 24];
  end

  // ------------------------------------------------------------ Stage 3
  awb_gamma_lut #(.GAIN_R(AWB_GAIN_R), .GAIN_G(8'd64), .GAIN_B(AWB_GAIN_B)) u_stage3 (
    .clk, .rst_n,
    .in_valid (br_valid), .in_flags (br_flags), .in_data (br_data),
    .out_valid, .out_flags, .out_data
  );

endmodule
