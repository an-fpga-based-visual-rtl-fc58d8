// demosaic_bilinear: Stage 2 of the pipeline. Bilinear demosaicing of the
// corrected Bayer stream, four pixels per clock.
//
// Every site keeps its own colour and takes the two missing ones from a 3x3
// window of same-colour neighbours:
//   at R (B) sites  G = mean of the 4 edge neighbours, B (R) = mean of the 4 diagonals
//   at G sites      the colour of the row = mean of left/right neighbours,
//                   the colour of the column = mean of upper/lower neighbours.
// Means are rounded ((sum+2)>>2, (sum+1)>>1) at 10 bits and the result keeps
// the upper 8 bits. Only adders and shifts are used, no multipliers.
// Border sites mirror across the edge (row -1 reads row 1, column -1 reads
// column 1), which keeps the Bayer phase; the rounding and the border rule are
// this design's choices.
//
// Structure: two 10-bit x 4 line buffers (one memory word of two lines per beat
// column) give three rows; a three-beat shift register gives the six columns
// the four centre pixels need. Register stages: S0 line-buffer read, S1 window,
// S2 neighbour sums, S3 colour select, S4 output pack.
// Interface: 40-bit RAW beat in; 128-bit beat out, pixel i = {8'h00,R,G,B} in
// bits [32i+31:32i]; sof/eol/eof flags; no backpressure. The top byte of
// each pixel is a constant zero (32 output bits never change); the format
// bridge after this stage drops it.
// Timing: pixel (r,c) leaves 1 line + 1 beat + 5 cycles after it entered for
// gap-free input; after eof the stage flushes 1 line + 1 beat.
module demosaic_bilinear
  import isp_pkg::*;
#(
  parameter int unsigned WIDTH  = 1920,
  parameter int unsigned HEIGHT = 1080,
  parameter bayer_e      BAYER  = BAYER_RGGB
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  input  frame_flags_t in_flags,
  input  raw_beat_t    in_data,
  output logic         out_valid,
  output frame_flags_t out_flags,
  output rgbx_beat_t   out_data
);

  localparam int unsigned BPL   = WIDTH / PPC;
  localparam int unsigned ROW_W = 16;
  localparam int unsigned COL_W = $clog2(BPL + 1);

  logic             adv, flushing;
  logic [ROW_W-1:0] e_row;
  logic [COL_W-1:0] e_col;

  raster_tracker #(.BPL(BPL), .FLUSH_BEATS(BPL + 1), .ROW_W(ROW_W), .COL_W(COL_W))
    u_rt (.clk, .rst_n, .in_valid, .in_sof(in_flags.sof), .in_eof(in_flags.eof),
          .adv, .flushing, .row(e_row), .col(e_col));

  // ---------------------------------------------------------------- S0
  raw_beat_t [1:0] lb_mem [BPL];   // slot 0: previous line, slot 1: the one before
  raw_beat_t [1:0] s0_rd;
  raw_beat_t       s0_cur;
  logic            s0_v;
  logic [ROW_W-1:0] s0_row;
  logic [COL_W-1:0] s0_col;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) s0_v <= 1'b0;
    else        s0_v <= adv;
  end

  always_ff @(posedge clk) begin
    if (adv) begin
      s0_rd  <= lb_mem[e_col];
      s0_cur <= flushing ? '0 : in_data;
      s0_row <= e_row;
      s0_col <= e_col;
    end
    if (s0_v)
      lb_mem[s0_col] <= {s0_rd[0], s0_cur};
  end

  // ---------------------------------------------------------------- S1
  // col_sr[k][r]: beat k of the shift register (0 = oldest), row r (0 = top)
  raw_beat_t [2:0][2:0]   col_sr;
  logic                   s1_v;
  logic signed [ROW_W:0]  s1_row;   // centre row (may be -1)
  logic [COL_W-1:0]       s1_col;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) s1_v <= 1'b0;
    else        s1_v <= s0_v;
  end

  always_ff @(posedge clk) begin
    if (s0_v) begin
      col_sr <= {{s0_cur, s0_rd[0], s0_rd[1]}, col_sr[2:1]};
      if (s0_col != '0) begin
        s1_row <= $signed({1'b0, s0_row}) - 1;
        s1_col <= s0_col - 1'b1;
      end else begin
        s1_row <= $signed({1'b0, s0_row}) - 2;
        s1_col <= COL_W'(BPL - 1);
      end
    end
  end

  // ---------------------------------------------------------------- S2
  // 3 x 6 window: w[r][j] is row (centre-1+r), column 4*s1_col - 1 + j
  logic [2:0][5:0][RAW_W-1:0] win;
  logic                       s1_ok;
  always_comb begin
    automatic int rt = (s1_row == 0) ? 2 : 0;                          // mirrored top
    automatic int rb = (s1_row == (ROW_W+1)'(HEIGHT - 1)) ? 0 : 2;     // mirrored bottom
    s1_ok = (s1_row >= 0) && (s1_row < (ROW_W+1)'(HEIGHT));
    for (int r = 0; r < 3; r++) begin
      automatic int rs = (r == 0) ? rt : (r == 2) ? rb : 1;
      for (int j = 0; j < 6; j++) begin
        automatic int jj = j;
        if (j == 0 && s1_col == '0)                 jj = 2;
        if (j == 5 && s1_col == COL_W'(BPL - 1))    jj = 3;
        // column j-1+4*col lives in beat (jj+3)/4 of the shift register
        win[r][j] = col_sr[(jj + 3) / 4][rs][((jj + 3) % 4)*RAW_W +: RAW_W];
      end
    end
  end

  typedef struct packed {
    logic [RAW_W-1:0] c;     // centre
    logic [RAW_W+1:0] edge4; // N+S+E+W
    logic [RAW_W+1:0] diag;  // four diagonals
    logic [RAW_W:0]   hor;   // W+E
    logic [RAW_W:0]   ver;   // N+S
  } nsum_t;

  nsum_t [PPC-1:0]  s2_ns;
  logic             s2_v;
  logic             s2_odd;
  frame_flags_t     s2_fl;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) s2_v <= 1'b0;
    else        s2_v <= s1_v && s1_ok;
  end

  always_ff @(posedge clk) begin
    if (s1_v) begin
      s2_odd    <= s1_row[0];
      s2_fl.sof <= (s1_row == 0) && (s1_col == 0);
      s2_fl.eol <= (s1_col == COL_W'(BPL - 1));
      s2_fl.eof <= (s1_row == (ROW_W+1)'(HEIGHT - 1)) && (s1_col == COL_W'(BPL - 1));
      for (int p = 0; p < PPC; p++) begin
        automatic int j = p + 1;
        s2_ns[p].c     <= win[1][j];
        s2_ns[p].hor   <= (RAW_W+1)'(win[1][j-1]) + (RAW_W+1)'(win[1][j+1]);
        s2_ns[p].ver   <= (RAW_W+1)'(win[0][j])   + (RAW_W+1)'(win[2][j]);
        s2_ns[p].edge4 <= (RAW_W+2)'(win[1][j-1]) + (RAW_W+2)'(win[1][j+1]) +
                          (RAW_W+2)'(win[0][j])   + (RAW_W+2)'(win[2][j]);
        s2_ns[p].diag  <= (RAW_W+2)'(win[0][j-1]) + (RAW_W+2)'(win[0][j+1]) +
                          (RAW_W+2)'(win[2][j-1]) + (RAW_W+2)'(win[2][j+1]);
      end
    end
  end

  // ---------------------------------------------------------------- S3
  function automatic logic [7:0] avg4(logic [RAW_W+1:0] s);
    automatic logic [RAW_W+1:0] t = s + 12'd2;
    return t[RAW_W+1:4];
  endfunction
  function automatic logic [7:0] avg2(logic [RAW_W:0] s);
    automatic logic [RAW_W:0] t = s + 11'd1;
    return t[RAW_W:3];
  endfunction

  logic [PPC-1:0][23:0] s3_rgb;
  logic                 s3_v;
  frame_flags_t         s3_fl;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) s3_v <= 1'b0;
    else        s3_v <= s2_v;
  end

  always_ff @(posedge clk) begin
    if (s2_v) begin
      s3_fl <= s2_fl;
      for (int p = 0; p < PPC; p++) begin
        automatic logic [7:0] own = s2_ns[p].c[RAW_W-1:2];
        unique case (cfa_at(BAYER, s2_odd, 1'(p)))
          CFA_R:   s3_rgb[p] <= {own, avg4(s2_ns[p].edge4), avg4(s2_ns[p].diag)};
          CFA_B:   s3_rgb[p] <= {avg4(s2_ns[p].diag), avg4(s2_ns[p].edge4), own};
          CFA_GR:  s3_rgb[p] <= {avg2(s2_ns[p].hor), own, avg2(s2_ns[p].ver)};
          default: s3_rgb[p] <= {avg2(s2_ns[p].ver), own, avg2(s2_ns[p].hor)};
        endcase
      end
    end
  end

  // ---------------------------------------------------------------- S4 (pack)
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= s3_v;
  end

  always_ff @(posedge clk) begin
    if (s3_v) begin
      out_flags <= s3_fl;
      for (int p = 0; p < PPC; p++)
        out_data[p*32 +: 32] <= {8'h00, s3_rgb[p]};
    end
  end

endmodule
