// tb_aec_histogram: self-checking test of the four-bank histogram.
//
// After the reset clear sweep, three frames of random samples are applied,
// with frequent repeats of the same bin on consecutive cycles (which exercises
// the write-back forwarding) and random idle cycles. After each frame the 256
// bins are scanned; every bank sum is compared with a count kept by the
// testbench, and the scan must leave the histogram empty for the next frame.
module tb_aec_histogram;
  logic clk = 0, rst_n = 0;
  logic [3:0] upd = '0;
  logic [3:0][7:0] bin = '0;
  logic scan_en = 0;
  logic [7:0] scan_addr = '0;
  logic [21:0] scan_sum;
  logic ready, idle;

  aec_histogram #(.NBANKS(4), .NBINS(256), .CNT_W(20)) dut (
    .clk, .rst_n, .upd, .bin, .scan_en, .scan_addr, .scan_sum, .ready, .idle);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int model [256];

  task automatic run_frame(int beats);
    foreach (model[i]) model[i] = 0;
    for (int i = 0; i < beats; i++) begin
      for (int k = 0; k < 4; k++) begin
        upd[k] <= ($urandom_range(0, 4) != 0);
        // a small set of bins so that repeats are common
        bin[k] <= 8'(($urandom_range(0, 1) == 0) ? $urandom_range(0, 3) : $urandom_range(0, 255));
      end
      @(posedge clk);
      for (int k = 0; k < 4; k++) if (upd[k]) model[bin[k]]++;
    end
    upd <= '0;
    @(posedge clk);
    @(posedge clk);
    checks++;
    if (!idle) begin failures++; $display("not idle after the frame"); end
    for (int a = 0; a < 256; a++) begin
      scan_en   <= 1;
      scan_addr <= 8'(a);
      @(posedge clk);
      if (a > 0) begin
        checks++;
        if (scan_sum != 22'(model[a - 1])) begin
          failures++;
          $display("bin %0d: got %0d expected %0d", a - 1, scan_sum, model[a - 1]);
        end
      end
    end
    scan_en <= 0;
    @(posedge clk);
    checks++;
    if (scan_sum != 22'(model[255])) begin
      failures++;
      $display("bin 255: got %0d expected %0d", scan_sum, model[255]);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (ready);
    @(posedge clk);
    run_frame(600);
    run_frame(1000);
    run_frame(50);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
