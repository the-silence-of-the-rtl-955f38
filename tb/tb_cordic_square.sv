// tb_cordic_square: checks the CORDIC squarer against real-valued x*x over
// the membrane-potential range and the clipping beyond it, and checks that
// each result arrives 22 clocks after start: one load clock and NEG_IT + FRAC + 1 = 21 iterations.
module tb_cordic_square;
  import izh_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  fix_t x, y;
  logic busy, done;
  int   checks = 0, failures = 0;

  cordic_square dut (.clk(clk), .rst_n(rst_n), .start(start), .x(x),
                     .busy(busy), .done(done), .y(y));

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic square(input real xr, input real expect_sq);
    int   cyc;
    real  got, tol;
    x = to_fix(xr);
    @(negedge clk) start = 1'b1;
    @(negedge clk) start = 1'b0;
    cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    got = real'(y) / real'(1 << FRAC);
    tol = (expect_sq < 0.0 ? 0.0 : 1.0) * 0.0 + 0.01;   // absolute, mV^2
    checks++;
    if (got - expect_sq > tol || expect_sq - got > tol) begin
      failures++;
      $display("FAIL square(%f) = %f, expected %f", xr, got, expect_sq);
    end
    checks++;
    if (cyc != 22) begin
      failures++;
      $display("FAIL square(%f) latency %0d, expected 22", xr, cyc);
    end
  endtask

  initial begin
    real xr;
    x = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    square(0.0, 0.0);
    square(30.0, 900.0);
    square(-65.0, 4225.0);
    square(-0.5, 0.25);
    square(127.5, 16256.25);
    for (int k = 0; k < 300; k++) begin
      xr = (real'($urandom_range(250000)) / 1000.0) - 125.0;
      xr = real'(to_fix(xr)) / real'(1 << FRAC);     // exact operand
      square(xr, xr * xr);
    end
    // beyond |x| < 128 the operand is clipped to the largest value in range
    square(200.0, (128.0 - 1.0 / 16384.0) * (128.0 - 1.0 / 16384.0));
    square(-300.0, (128.0 - 1.0 / 16384.0) * (128.0 - 1.0 / 16384.0));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
