// isp_pkg: types, constants and helper functions shared by the ISP pipeline.
//
// The pixel stream carries four pixels per clock ("a beat"). Beside the data
// every beat carries three framing flags: first beat of a frame (sof), last
// beat of a line (eol) and last beat of a frame (eof). There is no
// backpressure: a stage must accept a beat on every cycle that valid is high.
//
// Gains are Q2.6 unsigned fixed point throughout (64 = 1.0x), as the design
// description specifies for both the global AEC gain and the local bloom gain.
// The Bayer colour arrangement is a parameter of the modules; RGGB is this
// design's default.
package isp_pkg;

  localparam int unsigned PPC      = 4;   // pixels per clock
  localparam int unsigned RAW_W    = 10;  // sensor RAW bits
  localparam int unsigned RGB_W    = 8;   // bits per colour channel at the output
  localparam int unsigned GAIN_W   = 8;   // Q2.6 gain width
  localparam int unsigned GAIN_ONE = 64;  // 1.0x in Q2.6

  typedef enum logic [1:0] {
    BAYER_RGGB = 2'd0,
    BAYER_GRBG = 2'd1,
    BAYER_GBRG = 2'd2,
    BAYER_BGGR = 2'd3
  } bayer_e;

  // CFA channel of one site; also the index of the per-channel black level.
  typedef enum logic [1:0] {
    CFA_R  = 2'd0,
    CFA_GR = 2'd1,   // green on a row that also holds red
    CFA_GB = 2'd2,   // green on a row that also holds blue
    CFA_B  = 2'd3
  } cfa_e;

  typedef struct packed {
    logic sof;   // first beat of a frame
    logic eol;   // last beat of a line
    logic eof;   // last beat of a frame
  } frame_flags_t;

  typedef logic [PPC*RAW_W-1:0]   raw_beat_t;    // 40-bit: pixel i in bits [10i+9:10i]
  typedef logic [PPC*3*RGB_W-1:0] rgb_beat_t;    // 96-bit: pixel i = {R,G,B} in [24i+23:24i]
  typedef logic [PPC*32-1:0]      rgbx_beat_t;   // 128-bit: pixel i = {8'h00,R,G,B} in [32i+31:32i]

  // Colour of the site at (row parity, column parity) for a given pattern.
  function automatic cfa_e cfa_at(bayer_e pat, logic row_odd, logic col_odd);
    logic [1:0] pos;
    pos = {row_odd, col_odd};
    unique case (pat)
      BAYER_RGGB: cfa_at = (pos == 2'b00) ? CFA_R  : (pos == 2'b01) ? CFA_GR :
                           (pos == 2'b10) ? CFA_GB : CFA_B;
      BAYER_GRBG: cfa_at = (pos == 2'b00) ? CFA_GR : (pos == 2'b01) ? CFA_R  :
                           (pos == 2'b10) ? CFA_B  : CFA_GB;
      BAYER_GBRG: cfa_at = (pos == 2'b00) ? CFA_GB : (pos == 2'b01) ? CFA_B  :
                           (pos == 2'b10) ? CFA_R  : CFA_GR;
      default:    cfa_at = (pos == 2'b00) ? CFA_B  : (pos == 2'b01) ? CFA_GB :
                           (pos == 2'b10) ? CFA_GR : CFA_R;
    endcase
  endfunction

  function automatic logic is_green(cfa_e c);
    return (c == CFA_GR) || (c == CFA_GB);
  endfunction

endpackage
