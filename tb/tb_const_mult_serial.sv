// tb_const_mult_serial: checks init + sum(x >>> k) for random operands and
// masks against an independent integer computation, and that the result
// arrives popcount(mask)+1 clocks after start (one clock for an empty mask).
module tb_const_mult_serial;
  import izh_pkg::*;

  logic   clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  fix_t   x, init, result;
  cmask_t mask;
  logic   busy, done;
  int     checks = 0, failures = 0;

  const_mult_serial dut (.clk(clk), .rst_n(rst_n), .start(start), .x(x),
                         .mask(mask), .init(init), .busy(busy), .done(done),
                         .result(result));

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input fix_t xv, input cmask_t m, input fix_t iv);
    longint exp_v;
    int cyc, want_cyc;
    exp_v = longint'(iv);
    want_cyc = 0;
    for (int k = 0; k < MASKW; k++)
      if (m[k]) begin
        // floor division by 2^k, written without shifts
        exp_v += (longint'(xv) >= 0) ? longint'(xv) / (64'sd1 <<< k)
               : -((-longint'(xv) + (64'sd1 <<< k) - 1) / (64'sd1 <<< k));
        want_cyc++;
      end
    want_cyc = (want_cyc == 0) ? 1 : want_cyc + 1;   // load clock + one per term
    x = xv; mask = m; init = iv;
    @(negedge clk) start = 1'b1;
    @(negedge clk) start = 1'b0;
    cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    checks++;
    if (longint'(result) != (exp_v & 64'h3FFF_FFFF) - ((exp_v & 64'h2000_0000) << 1)) begin
      failures++;
      $display("FAIL x=%0d mask=%h init=%0d got %0d want %0d", xv, m, iv, result, exp_v);
    end
    checks++;
    if (cyc != want_cyc) begin
      failures++;
      $display("FAIL mask=%h latency %0d want %0d", m, cyc, want_cyc);
    end
  endtask

  initial begin
    x = '0; mask = '0; init = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    run(to_fix(100.0), MASK_004, '0);          // 0.04 * 100 ~ 3.955
    run(to_fix(-65.0), MASK_B, to_fix(13.0));
    run(to_fix(-0.3), MASK_A, '0);
    run(to_fix(5.0), '0, to_fix(1.0));
    for (int k = 0; k < 400; k++)
      run(fix_t'($urandom_range(32'h3FFF_FFFF) - 32'h1FFF_FFFF) >>> 2,
          cmask_t'($urandom), fix_t'($urandom_range(32'h0FFF_FFFF) - 32'h07FF_FFFF));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
