// aec_side_channel: frame-level auto exposure control, running beside the
// pixel path.
//
// It watches the RAW beats entering the pipeline without delaying them. During
// the active frame it builds a 256-bin histogram of the green sites (bin =
// raw >> 2, four banks, one per pixel lane) and counts over-exposed
// (raw > OE_THR) and under-exposed (raw < UE_THR) pixels of all colours. On
// the eof beat it starts a short program in the vertical blanking interval:
//   S_FLUSH   wait for the histogram's last write-back; percentile thresholds
//   S_SCAN    256 cycles: accumulate the banks into a cumulative count and
//             latch p02, p50, p98 (smallest bin whose cumulative count exceeds
//             2 %, 50 %, 98 % of the green samples); this also clears the bins
//   S_DRAIN   accumulate the last bin
//   S_DIV_HL  hl_safe = HL_TARGET*64 / p98   (gain that puts p98 at HL_TARGET)
//   S_DIV_UE  ue_lift = LIFT_TARGET*64 / p02 (gain that lifts p02 to LIFT_TARGET)
//   S_CALC_1  five-way decision, in priority order:
//             OE_CUT  over-exposed count > pixels/128   -> gain - gain/4 at once
//             CLAMP   p98*gain > HI_THR                  -> target hl_safe
//             BOTH    clamp and lift conditions together -> treated as CLAMP
//             LIFT    p02*gain <= NOISE_FLOOR            -> target min(ue_lift, hl_safe)
//             IDLE    otherwise                          -> target = gain
//   S_CALC_1B IIR: step = (target - gain) / 2^IIR_SHIFT, rounded; then the
//             slew limit clamps the step to +-SLEW_MAX
//   S_CALC_2  gain <= clamp(gain + step, GAIN_MIN, GAIN_MAX);
//             bloom_core <= p98*200/256
// so the gain measured on frame N is applied to frame N+1. The whole program
// takes about 300 cycles (three more than the 256-bin scan and two 16-cycle
// divisions), which the vertical blanking must cover.
//
// From the design description: the histogram organisation, the three
// percentiles, the 1/128 emergency rule, the priority order of the five
// decisions, IIR then slew limiting, gain bounds 16..96 in Q2.6 (0.25x..1.5x),
// OE/UE thresholds 900 and 64, bloom_core = p98*200/256 and the state sequence.
// This design's own choices: the percentile rule, the thresholds HI_THR,
// HL_TARGET, NOISE_FLOOR, LIFT_TARGET, the IIR coefficient 1/4, the slew step
// of 2 codes (2.5 % of the 80-code range, the description asks for about 3 %),
// the size of the emergency cut, and judging p02/p98 after the current gain
// (the histogram is taken before the gain is applied).
//
// Interface: the pipeline's input beat (valid, flags, 40-bit RAW). Outputs are
// registers that change only in S_CALC_2; update pulses for one clock then.
module aec_side_channel
  import isp_pkg::*;
#(
  parameter int unsigned WIDTH       = 1920,
  parameter int unsigned HEIGHT      = 1080,
  parameter bayer_e      BAYER       = BAYER_RGGB,
  parameter int unsigned OE_THR      = 900,   // RAW10 over-exposure threshold
  parameter int unsigned UE_THR      = 64,    // RAW10 under-exposure threshold
  parameter int unsigned HI_THR      = 225,   // p98 after gain above this: clamp
  parameter int unsigned HL_TARGET   = 200,   // where the clamp puts p98
  parameter int unsigned NOISE_FLOOR = 16,    // p02 after gain at or below this: lift
  parameter int unsigned LIFT_TARGET = 32,    // where the lift puts p02
  parameter int unsigned GAIN_MIN    = 16,    // 0.25x
  parameter int unsigned GAIN_MAX    = 96,    // 1.5x
  parameter int unsigned GAIN_INIT   = 64,    // 1.0x
  parameter int unsigned SLEW_MAX    = 2,
  parameter int unsigned IIR_SHIFT   = 2
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid,
  input  frame_flags_t      in_flags,
  input  raw_beat_t         in_data,
  output logic [GAIN_W-1:0] global_gain,   // Q2.6
  output logic [7:0]        bloom_core,
  output logic [7:0]        p02,
  output logic [7:0]        p50,
  output logic [7:0]        p98,
  output logic [21:0]       oe_count,      // of the last frame
  output logic [21:0]       ue_count,
  output logic [2:0]        decision,      // aec_dec_e of the last update
  output logic              update         // one-clock pulse when the outputs change
);

  typedef enum logic [3:0] {
    S_WAIT, S_FLUSH, S_SCAN, S_DRAIN, S_DIV_HL, S_DIV_UE, S_CALC_1, S_CALC_1B, S_CALC_2
  } aec_state_e;

  typedef enum logic [2:0] {
    DEC_IDLE = 3'd0, DEC_OE_CUT = 3'd1, DEC_CLAMP = 3'd2, DEC_LIFT = 3'd3, DEC_BOTH = 3'd4
  } aec_dec_e;

  localparam int unsigned TOTAL   = WIDTH * HEIGHT;
  localparam int unsigned HCNT_W  = 20;
  localparam int unsigned SUM_W   = HCNT_W + 2;

  aec_state_e state;

  // ------------------------------------------------------------ monitoring
  logic row_odd_q, row_odd;
  assign row_odd = (in_valid && in_flags.sof) ? 1'b0 : row_odd_q;

  logic [PPC-1:0]       h_upd;
  logic [PPC-1:0][7:0]  h_bin;
  logic [2:0]           n_oe, n_ue, n_g;
  always_comb begin
    n_oe = '0;
    n_ue = '0;
    n_g  = '0;
    for (int p = 0; p < PPC; p++) begin
      automatic logic [RAW_W-1:0] px = in_data[p*RAW_W +: RAW_W];
      h_bin[p] = px[RAW_W-1:2];
      h_upd[p] = in_valid && is_green(cfa_at(BAYER, row_odd, 1'(p)));
      n_g  = n_g  + 3'(h_upd[p]);
      n_oe = n_oe + 3'(in_valid && (px > RAW_W'(OE_THR)));
      n_ue = n_ue + 3'(in_valid && (px < RAW_W'(UE_THR)));
    end
  end

  logic              scan_en;
  logic [7:0]        scan_addr;
  logic [SUM_W-1:0]  scan_sum;
  logic              h_ready, h_idle;

  aec_histogram #(.NBANKS(PPC), .NBINS(256), .CNT_W(HCNT_W)) u_hist (
    .clk, .rst_n,
    .upd      (h_upd & {PPC{state == S_WAIT}}),
    .bin      (h_bin),
    .scan_en, .scan_addr, .scan_sum,
    .ready    (h_ready),
    .idle     (h_idle)
  );

  logic [21:0] oe_cnt, ue_cnt, g_cnt;       // running, this frame
  logic [21:0] oe_frm, g_frm;               // latched at eof
  logic        frame_end;
  assign frame_end = in_valid && in_flags.eof && (state == S_WAIT) && h_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      row_odd_q <= 1'b0;
      oe_cnt    <= '0;
      ue_cnt    <= '0;
      g_cnt     <= '0;
      oe_frm    <= '0;
      g_frm     <= '0;
      oe_count  <= '0;
      ue_count  <= '0;
    end else begin
      if (in_valid)
        row_odd_q <= in_flags.eol ? !row_odd : row_odd;
      if (in_valid && in_flags.sof) begin
        oe_cnt <= 22'(n_oe);
        ue_cnt <= 22'(n_ue);
        g_cnt  <= 22'(n_g);
      end else if (in_valid) begin
        oe_cnt <= oe_cnt + 22'(n_oe);
        ue_cnt <= ue_cnt + 22'(n_ue);
        g_cnt  <= g_cnt  + 22'(n_g);
      end
      if (frame_end) begin
        oe_frm   <= oe_cnt + 22'(n_oe);
        g_frm    <= g_cnt  + 22'(n_g);
        oe_count <= oe_cnt + 22'(n_oe);
        ue_count <= ue_cnt + 22'(n_ue);
      end
    end
  end

  // ------------------------------------------------------------ divider
  logic        div_start, div_done;
  logic [15:0] div_num, div_q;
  logic [7:0]  div_den;

  seq_divider #(.NUM_W(16), .DEN_W(8)) u_div (
    .clk, .rst_n, .start(div_start), .num(div_num), .den(div_den),
    .busy(), .done(div_done), .quot(div_q)
  );

  // ------------------------------------------------------------ V-blank program
  logic [21:0]      thr02, thr50, thr98;
  logic [21:0]      cum;
  logic [7:0]       ret_addr;          // bin whose sum is on scan_sum
  logic             ret_v;
  logic [2:0]       found;             // p02, p50, p98 latched
  logic [15:0]      hl_safe, ue_lift;
  logic [9:0]       target;            // gain target of this frame
  logic signed [10:0] step;
  aec_dec_e         dec;
  logic             started;           // divider launched in this state

  // percentile test for the bin arriving now
  logic [21:0] cum_new;
  assign cum_new = cum + 22'(scan_sum);

  // decision inputs, with the gain in force
  logic [15:0] p98_eff, p02_eff;
  assign p98_eff = (16'(p98) * 16'(global_gain)) >> 6;
  assign p02_eff = (16'(p02) * 16'(global_gain)) >> 6;

  logic cond_oe, cond_clamp, cond_lift;
  assign cond_oe    = oe_frm > 22'(TOTAL / 128);
  assign cond_clamp = p98_eff > 16'(HI_THR);
  assign cond_lift  = p02_eff <= 16'(NOISE_FLOOR);

  function automatic logic [9:0] min10(logic [15:0] a, logic [15:0] b);
    automatic logic [15:0] m = (a < b) ? a : b;
    return (m > 16'd1023) ? 10'd1023 : m[9:0];
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= S_WAIT;
      scan_en     <= 1'b0;
      scan_addr   <= '0;
      ret_v       <= 1'b0;
      ret_addr    <= '0;
      cum         <= '0;
      found       <= '0;
      thr02       <= '0;
      thr50       <= '0;
      thr98       <= '0;
      p02         <= '0;
      p50         <= '0;
      p98         <= '0;
      hl_safe     <= '0;
      ue_lift     <= '0;
      target      <= '0;
      step        <= '0;
      dec         <= DEC_IDLE;
      decision    <= DEC_IDLE;
      started     <= 1'b0;
      div_start   <= 1'b0;
      div_num     <= '0;
      div_den     <= '0;
      global_gain <= GAIN_W'(GAIN_INIT);
      bloom_core  <= 8'd199;   // p98 = 255 before the first frame
      update      <= 1'b0;
    end else begin
      div_start <= 1'b0;
      update    <= 1'b0;
      ret_v     <= scan_en;
      ret_addr  <= scan_addr;
      if (ret_v) begin
        cum <= cum_new;
        if (!found[0] && cum_new > thr02) begin p02 <= ret_addr; found[0] <= 1'b1; end
        if (!found[1] && cum_new > thr50) begin p50 <= ret_addr; found[1] <= 1'b1; end
        if (!found[2] && cum_new > thr98) begin p98 <= ret_addr; found[2] <= 1'b1; end
      end

      unique case (state)
        S_WAIT: if (frame_end) state <= S_FLUSH;

        S_FLUSH: begin
          thr02 <= 22'((40'(g_frm) * 40'd1311)  >> 16);   // 2 %
          thr50 <= g_frm >> 1;                             // 50 %
          thr98 <= 22'((40'(g_frm) * 40'd64225) >> 16);   // 98 %
          cum   <= '0;
          found <= '0;
          p02   <= 8'd255;
          p50   <= 8'd255;
          p98   <= 8'd255;
          if (h_idle) begin
            state     <= S_SCAN;
            scan_en   <= 1'b1;
            scan_addr <= '0;
          end
        end

        S_SCAN: begin
          if (scan_addr == 8'd255) begin
            scan_en <= 1'b0;
            state   <= S_DRAIN;
          end else begin
            scan_addr <= scan_addr + 1'b1;
          end
        end

        S_DRAIN: if (!ret_v) begin
          state   <= S_DIV_HL;
          started <= 1'b0;
        end

        S_DIV_HL: begin
          if (!started) begin
            div_start <= 1'b1;
            div_num   <= 16'(HL_TARGET * 64);
            div_den   <= p98;
            started   <= 1'b1;
          end else if (div_done) begin
            hl_safe <= div_q;
            started <= 1'b0;
            state   <= S_DIV_UE;
          end
        end

        S_DIV_UE: begin
          if (!started) begin
            div_start <= 1'b1;
            div_num   <= 16'(LIFT_TARGET * 64);
            div_den   <= p02;
            started   <= 1'b1;
          end else if (div_done) begin
            ue_lift <= div_q;
            started <= 1'b0;
            state   <= S_CALC_1;
          end
        end

        S_CALC_1: begin
          if (cond_oe) begin
            dec    <= DEC_OE_CUT;
            target <= 10'(global_gain) - 10'(global_gain >> 2);
          end else if (cond_clamp && cond_lift) begin
            dec    <= DEC_BOTH;
            target <= min10(hl_safe, 16'hFFFF);
          end else if (cond_clamp) begin
            dec    <= DEC_CLAMP;
            target <= min10(hl_safe, 16'hFFFF);
          end else if (cond_lift) begin
            dec    <= DEC_LIFT;
            target <= min10(ue_lift, hl_safe);
          end else begin
            dec    <= DEC_IDLE;
            target <= 10'(global_gain);
          end
          state <= S_CALC_1B;
        end

        S_CALC_1B: begin
          if (dec == DEC_OE_CUT) begin
            // emergency: no smoothing, no slew limit
            step <= $signed({1'b0, target}) - $signed(11'(global_gain));
          end else begin
            automatic logic signed [10:0] diff = $signed({1'b0, target}) - $signed(11'(global_gain));
            automatic logic signed [10:0] half = 11'(1 << (IIR_SHIFT - 1));
            automatic logic signed [10:0] iir  = (diff >= 0) ? ((diff + half) >>> IIR_SHIFT)
                                                             : -((-diff + half) >>> IIR_SHIFT);
            if (iir > $signed(11'(SLEW_MAX)))       step <= $signed(11'(SLEW_MAX));
            else if (iir < -$signed(11'(SLEW_MAX))) step <= -$signed(11'(SLEW_MAX));
            else                                     step <= iir;
          end
          state <= S_CALC_2;
        end

        S_CALC_2: begin
          automatic logic signed [11:0] g = $signed({4'd0, global_gain}) + 12'(step);
          if (g < $signed(12'(GAIN_MIN)))      global_gain <= GAIN_W'(GAIN_MIN);
          else if (g > $signed(12'(GAIN_MAX))) global_gain <= GAIN_W'(GAIN_MAX);
          else                                 global_gain <= g[GAIN_W-1:0];
          bloom_core <= 8'((16'(p98) * 16'd200) >> 8);
          decision   <= dec;
          update     <= 1'b1;
          state      <= S_WAIT;
        end

        default: state <= S_WAIT;
      endcase
    end
  end

  // A frame must not end while the previous one is still being evaluated.
  a_vblank_long_enough: assert property (@(posedge clk) disable iff (!rst_n)
    (in_valid && in_flags.eof) |-> (state == S_WAIT))
    else $error("aec_side_channel: frame ended before the previous gain update finished");

endmodule
