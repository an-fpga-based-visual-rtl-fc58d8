// tb_seq_divider: self-checking test of the sequential divider.
//
// Edge cases (zero numerator, divisor 1, divisor 255, largest numerator,
// division by zero) and 300 random divisions of a 16-bit numerator by an
// 8-bit divisor. Each quotient is compared with the integer quotient, and the
// result must arrive exactly 16 cycles after start.
module tb_seq_divider;
  logic clk = 0, rst_n = 0;
  logic start = 0;
  logic [15:0] num = '0;
  logic [7:0] den = '0;
  logic busy, done;
  logic [15:0] quot;

  seq_divider #(.NUM_W(16), .DEN_W(8)) dut (.clk, .rst_n, .start, .num, .den, .busy, .done, .quot);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  task automatic divide(int n, int d);
    int cycles = 0;
    int e;
    num   <= 16'(n);
    den   <= 8'(d);
    start <= 1;
    @(posedge clk);
    start <= 0;
    do begin
      @(posedge clk);
      cycles++;
      @(negedge clk);
    end while (!done && cycles < 40);
    e = (d == 0) ? 65535 : n / d;
    checks += 2;
    if (quot != 16'(e)) begin
      failures++;
      $display("%0d / %0d: got %0d expected %0d", n, d, quot, e);
    end
    if (cycles != 16) begin
      failures++;
      $display("%0d / %0d took %0d cycles", n, d, cycles);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    divide(0, 7);
    divide(12800, 1);
    divide(12800, 255);
    divide(65535, 1);
    divide(65535, 3);
    divide(1234, 0);
    divide(2048, 16);
    for (int i = 0; i < 300; i++) divide(int'($urandom_range(0, 65535)), int'($urandom_range(1, 255)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
