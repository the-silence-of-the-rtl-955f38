// tb_duplex_neuron: steps one neuron with a constant input current and
// checks every Euler step against a real-valued reference of the same
// equations: alpha/beta when they are recomputed, that they are held
// bit-exactly in the quasi-static state, v and u after the update and the
// after-spike reset, the choice between full and quasi-static steps
// (|dv| > delta), and the step latency (5 or 32 clocks). It runs the
// neuron as unmodified (duplex_en = 0) and with delta = 1/8 mV, and prints
// the clocks per spike of both at I = 16. A final silent phase (I = 0,
// settled at rest) checks the forced refresh after 64 quasi-static steps in a row.
module tb_duplex_neuron;
  import izh_pkg::*;

  localparam real A_C  = 1.0/64 + 1.0/256 + 1.0/4096;
  localparam real B_C  = 1.0/8 + 1.0/16 + 1.0/128 + 1.0/256;
  localparam real K04  = 1.0/32 + 1.0/128 + 1.0/2048;
  localparam real SC   = 16384.0;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0, duplex_en = 1'b1;
  fix_t i_in, delta, v, u, alpha, beta;
  logic ready, done, spike, step_full;
  int   checks = 0, failures = 0;
  int   n_full = 0, n_qs = 0, n_spike = 0, n_fs_to_qs = 0, n_forced = 0;

  duplex_neuron dut (.clk(clk), .rst_n(rst_n), .start(start), .i_in(i_in),
                     .delta(delta), .duplex_en(duplex_en), .ready(ready),
                     .done(done), .spike(spike), .step_full(step_full),
                     .v(v), .u(u), .alpha(alpha), .beta(beta));

  always #5 clk = ~clk;

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real r(input fix_t f);
    return real'(f) / SC;
  endfunction

  task automatic check_close(input string what, input real got, input real want,
                             input real tol);
    checks++;
    if (got - want > tol || want - got > tol) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %f want %f", what, got, want);
    end
  endtask

  // expected kind of the next step: 1 full, 0 quasi-static, -1 undecided
  int exp_full = 1;
  logic prev_full = 1'b1;
  int qs_run = 0;                 // consecutive quasi-static steps so far

  // one Euler step, checked; returns whether it spiked
  task automatic step(output logic fired);
    fix_t v0, u0, a0, b0;
    real  ar, br, vn, un, dvr, ve, ue;
    int   cyc;
    v0 = v; u0 = u; a0 = alpha; b0 = beta;
    @(negedge clk) start = 1'b1;
    @(negedge clk) start = 1'b0;
    cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    fired = spike;
    if (!duplex_en) exp_full = 1;
    if (exp_full != -1) begin
      checks++;
      if (int'(step_full) != exp_full) begin
        failures++;
        if (failures < 20) $display("FAIL step kind %0d want %0d", step_full, exp_full);
      end
    end
    checks++;
    if (cyc != (step_full ? 32 : 5)) begin
      failures++;
      if (failures < 20) $display("FAIL latency %0d (full=%0d)", cyc, step_full);
    end
    if (step_full) begin
      n_full++;
      ar = K04 * r(v0) * r(v0) + 140.0 - r(u0);
      br = A_C * (B_C * r(v0) - r(u0));
      check_close("alpha", r(alpha), ar, 0.01);
      check_close("beta", r(beta), br, 0.001);
    end else begin
      n_qs++;
      checks++;
      if (alpha != a0 || beta != b0) begin
        failures++;
        if (failures < 20) $display("FAIL alpha/beta changed in a quasi-static step");
      end
    end
    if (prev_full && !step_full) n_fs_to_qs++;
    if (step_full && qs_run >= 64) n_forced++;
    qs_run = step_full ? 0 : qs_run + 1;
    prev_full = step_full;
    // update from the alpha/beta the step actually used
    dvr = (r(alpha) + 5.0 * r(v0) + r(i_in)) / 32.0;
    vn  = r(v0) + dvr;
    un  = r(u0) + r(beta) / 32.0;
    if (vn > 30.0 + 0.001 || vn < 30.0 - 0.001) begin
      checks++;
      if (spike != (vn > 30.0)) begin
        failures++;
        if (failures < 20) $display("FAIL spike %0d at vn=%f", spike, vn);
      end
    end
    if (spike) begin
      n_spike++;
      ve = -65.0;
      ue = un + 6.0;
    end else begin
      ve = vn;
      ue = un;
    end
    check_close("v", r(v), ve, 0.001);
    check_close("u", r(u), ue, 0.001);
    // what the next step must be
    if (spike) exp_full = 1;
    else if (dvr > r(delta) + 0.0002 || dvr < -r(delta) - 0.0002) exp_full = 1;
    else if (dvr < r(delta) - 0.0002 && dvr > -r(delta) + 0.0002) exp_full = 0;
    else exp_full = -1;
    if (duplex_en && qs_run >= 64) exp_full = 1;   // forced refresh
  endtask

  // run until n spikes, return clocks per spike after the first spike
  task automatic run_spikes(input int n, output int clk_per_spike);
    logic f;
    int spikes, t0, t;
    spikes = 0; t = 0; t0 = 0;
    while (spikes < n) begin
      int c0;
      c0 = 0;
      step(f);
      if (f) begin
        spikes++;
        if (spikes == 1) t0 = $time;
      end
    end
    clk_per_spike = ($time - t0) / 10 / (n - 1);
  endtask

  initial begin
    int cps_un, cps_dx;
    i_in = to_fix(16.0);
    delta = to_fix(0.125);
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check_close("v after reset", r(v), -65.0, 0.0);
    check_close("u after reset", r(u), -13.0, 0.0);
    checks++;
    if (!ready) failures++;
    // unmodified neuron
    duplex_en = 1'b0;
    run_spikes(4, cps_un);
    // duplex neuron, delta = 1/8 mV
    duplex_en = 1'b1;
    exp_full = 1;       // first step after a spike is always full anyway
    run_spikes(4, cps_dx);
    $display("clocks per spike at I=16: unmodified %0d, duplex delta=1/8 %0d (%0.1f%% fewer)",
             cps_un, cps_dx, 100.0 * real'(cps_un - cps_dx) / real'(cps_un));
    checks++;
    if (!(cps_dx < cps_un)) begin failures++; $display("FAIL duplex not faster"); end
    // silent neuron: long quasi-static runs end in a forced refresh
    // (settle at rest as unmodified first, so that v sits at its fixed
    // point, then continue as duplex)
    i_in = '0;
    duplex_en = 1'b0;
    for (int k = 0; k < 12000; k++) begin
      logic f;
      step(f);
    end
    duplex_en = 1'b1;
    for (int k = 0; k < 800; k++) begin
      logic f;
      step(f);
    end
    $display("full steps %0d, quasi-static steps %0d, spikes %0d, FS->QS %0d, forced refreshes %0d",
             n_full, n_qs, n_spike, n_fs_to_qs, n_forced);
    checks++; if (n_forced == 0) failures++;
    checks++; if (n_qs == 0) failures++;
    checks++; if (n_fs_to_qs == 0) failures++;
    checks++; if (n_spike == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
