// aec_histogram: 256-bin brightness histogram in four banks, one bank per
// pixel lane of the 4-pixel beat, as the AEC side channel needs it.
//
// During the active frame, lane i may add one count to bin bin[i] of bank i per
// clock (upd[i]). Each bank is a read-modify-write pipeline over a memory with
// registered read: the bin is read on the clock the sample arrives and written
// back, plus one, on the next clock. When two consecutive samples hit the same
// bin the second takes the value being written instead of the stale read.
// During vertical blanking the controller scans the bins in order: scan_en with
// scan_addr reads that bin of all four banks and clears it; the sum of the four
// banks is on scan_sum one clock later. The scan therefore also empties the
// histogram for the next frame. After reset an internal sweep clears every bin
// (NBINS cycles, ready low, samples ignored).
//
// The four-bank organisation and the bin count follow the design description;
// the read-modify-write scheme is this design's choice.
module aec_histogram #(
  parameter int unsigned NBANKS = 4,
  parameter int unsigned NBINS  = 256,
  parameter int unsigned CNT_W  = 20     // per-bank count; 1080p has 518,400 beats
) (
  input  logic                                clk,
  input  logic                                rst_n,
  input  logic [NBANKS-1:0]                   upd,
  input  logic [NBANKS-1:0][$clog2(NBINS)-1:0] bin,
  input  logic                                scan_en,
  input  logic [$clog2(NBINS)-1:0]            scan_addr,
  output logic [CNT_W+$clog2(NBANKS)-1:0]     scan_sum,
  output logic                                ready,    // clear sweep finished
  output logic                                idle      // no update in flight
);

  localparam int unsigned AW = $clog2(NBINS);

  logic [AW-1:0] clr_addr;
  logic          clearing;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      clearing <= 1'b1;
      clr_addr <= '0;
    end else if (clearing) begin
      clr_addr <= clr_addr + 1'b1;
      if (clr_addr == AW'(NBINS - 1)) clearing <= 1'b0;
    end
  end
  assign ready = !clearing;

  logic [NBANKS-1:0]            u1;       // sample read this clock, written next
  logic [NBANKS-1:0][AW-1:0]    b1;
  logic [NBANKS-1:0]            u2;       // last written sample, for forwarding
  logic [NBANKS-1:0][AW-1:0]    b2;
  logic [NBANKS-1:0][CNT_W-1:0] w2;
  logic [NBANKS-1:0][CNT_W-1:0] rd;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      u1 <= '0;
      u2 <= '0;
    end else begin
      u1 <= upd & {NBANKS{!clearing && !scan_en}};
      u2 <= u1;
    end
  end

  for (genvar k = 0; k < NBANKS; k++) begin : g_bank
    logic [CNT_W-1:0] mem [NBINS];
    logic [CNT_W-1:0] cur, nxt;

    assign cur = (u2[k] && b2[k] == b1[k]) ? w2[k] : rd[k];
    assign nxt = cur + 1'b1;

    always_ff @(posedge clk) begin
      rd[k] <= mem[scan_en ? scan_addr : bin[k]];
      b1[k] <= bin[k];
      b2[k] <= b1[k];
      w2[k] <= nxt;
      if (clearing)
        mem[clr_addr] <= '0;
      else if (scan_en)
        mem[scan_addr] <= '0;
      else if (u1[k])
        mem[b1[k]] <= nxt;
    end
  end

  always_comb begin
    scan_sum = '0;
    for (int k = 0; k < NBANKS; k++)
      scan_sum = scan_sum + (CNT_W + $clog2(NBANKS))'(rd[k]);
  end

  assign idle = (u1 == '0);

  // The controller must not scan while a sample is still being written back.
  a_scan_after_drain: assert property (@(posedge clk) disable iff (!rst_n)
    scan_en |-> (u1 == '0))
    else $error("aec_histogram: scan overlaps a histogram update");

endmodule
