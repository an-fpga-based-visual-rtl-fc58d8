// seq_divider: unsigned restoring divider, one quotient bit per clock.
//
// The AEC side channel uses it during vertical blanking to turn percentiles
// into gains (highlight-safe ceiling from p98, shadow lift from p02); a
// 16-cycle sequential divider is what the design description names for each.
// Division by zero returns an all-ones quotient.
//
// Interface: pulse start with num/den valid; done pulses for one cycle
// NUM_W cycles later with quot valid (quot holds until the next start).
// busy is high from the cycle after start until done.
module seq_divider #(
  parameter int unsigned NUM_W = 16,
  parameter int unsigned DEN_W = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  logic [NUM_W-1:0] num,
  input  logic [DEN_W-1:0] den,
  output logic             busy,
  output logic             done,
  output logic [NUM_W-1:0] quot
);

  localparam int unsigned CNT_W = $clog2(NUM_W + 1);

  logic [DEN_W:0]   rem;       // partial remainder, one bit wider than den
  logic [NUM_W-1:0] dividend;  // remaining numerator bits, MSB first
  logic [DEN_W-1:0] den_q;
  logic [CNT_W-1:0] cnt;
  logic [DEN_W:0]   trial;

  assign trial = {rem[DEN_W-1:0], dividend[NUM_W-1]};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy     <= 1'b0;
      done     <= 1'b0;
      cnt      <= '0;
      rem      <= '0;
      dividend <= '0;
      den_q    <= '0;
      quot     <= '0;
    end else begin
      done <= 1'b0;
      if (start) begin
        busy     <= 1'b1;
        cnt      <= CNT_W'(NUM_W);
        rem      <= '0;
        dividend <= num;
        den_q    <= den;
      end else if (busy) begin
        dividend <= {dividend[NUM_W-2:0], 1'b0};
        if (den_q == '0) begin
          quot <= {quot[NUM_W-2:0], 1'b1};
        end else if (trial >= {1'b0, den_q}) begin
          rem  <= trial - {1'b0, den_q};
          quot <= {quot[NUM_W-2:0], 1'b1};
        end else begin
          rem  <= trial;
          quot <= {quot[NUM_W-2:0], 1'b0};
        end
        cnt <= cnt - 1'b1;
        if (cnt == CNT_W'(1)) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

endmodule
