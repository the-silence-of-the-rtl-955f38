// tb_workload_delta_sweep: runs a single neuron through the threshold
// sweeps used to evaluate the duplex idea.
//  * I = 16, delta = 1/1024, 1/256, 1/128, 1/16, 1/8 mV and the unmodified
//    neuron: clocks per spike and the share of quasi-static steps.
//  * delta = 0.001, 0.005, 0.01, 0.05, 0.1, 0.2 mV near the firing
//    threshold: share of skipped alpha/beta computations and the
//    spike-period error against the unmodified neuron. With the
//    shift-and-add coefficients (0.04 -> 0.03955, b -> 0.19922) the lowest
//    constant current that makes the neuron fire is
//    (5-b)^2 / (4*0.03955) - 140 = 5.7 instead of 4.0, so the sweep that is
//    run at I = 4 with exact coefficients is run here at I = 6.
//  * A tonic-bursting neuron (c = -50, d = 2) at I = 16 with delta = 1/8:
//    it must fire in bursts, i.e. show both short and long inter-spike
//    intervals.
// Checks: no threshold costs more clocks per spike than the unmodified
// neuron, the largest threshold saves at least 20 %, the skipped share
// grows with delta, the unmodified neuron never skips, and bursting occurs.
module tb_workload_delta_sweep;
  import izh_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0, duplex_en = 1'b1;
  fix_t i_in, delta, v, u, alpha, beta;
  logic ready, done, spike, step_full;
  logic b_start = 1'b0, b_ready, b_done, b_spike, b_full;
  fix_t b_v, b_u, b_a, b_b;
  int   checks = 0, failures = 0;

  duplex_neuron dut (.clk(clk), .rst_n(rst_n), .start(start), .i_in(i_in),
                     .delta(delta), .duplex_en(duplex_en), .ready(ready),
                     .done(done), .spike(spike), .step_full(step_full),
                     .v(v), .u(u), .alpha(alpha), .beta(beta));

  // tonic bursting: c = -50, d = 2, u0 = b*c = -10
  duplex_neuron #(.V_RESET(to_fix(-50.0)), .D_RESET(to_fix(2.0)),
                  .U_INIT(to_fix(-10.0))) dut_burst (
    .clk(clk), .rst_n(rst_n), .start(b_start), .i_in(to_fix(16.0)),
    .delta(to_fix(0.125)), .duplex_en(1'b1), .ready(b_ready), .done(b_done),
    .spike(b_spike), .step_full(b_full), .v(b_v), .u(b_u), .alpha(b_a),
    .beta(b_b));

  always #5 clk = ~clk;

  initial begin
    repeat (20000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Reset, then run until `nspk` spikes. Returns clocks per spike and
  // steps per spike (both measured from the first to the last spike) and
  // the share of quasi-static steps in percent.
  task automatic measure(input real cur, input real dl, input logic dx, input int nspk,
                         output real cps, output real sps, output real csp);
    int spikes, clk0, clks, steps, steps0, nq, nf;
    i_in = to_fix(cur); delta = to_fix(dl); duplex_en = dx;
    rst_n = 1'b0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    spikes = 0; clks = 0; steps = 0; nq = 0; nf = 0; clk0 = 0; steps0 = 0;
    while (spikes < nspk) begin
      @(negedge clk) start = 1'b1;
      @(negedge clk) start = 1'b0;
      clks += 2;
      while (!done) begin @(negedge clk); clks++; end
      clks--;                          // the done clock starts the next step
      steps++;
      if (step_full) nf++; else nq++;
      if (spike) begin
        spikes++;
        if (spikes == 1) begin clk0 = clks; steps0 = steps; end
      end
    end
    cps = real'(clks - clk0) / real'(nspk - 1);
    sps = real'(steps - steps0) / real'(nspk - 1);
    csp = 100.0 * real'(nq) / real'(nq + nf);
  endtask

  task automatic check(input logic ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  real d16 [5] = '{1.0/1024, 1.0/256, 1.0/128, 1.0/16, 1.0/8};
  real d4  [6] = '{0.001, 0.005, 0.01, 0.05, 0.1, 0.2};

  // bursting neuron, stepped on its own
  int isi [$];
  initial begin
    int last, n;
    @(posedge rst_n);
    n = 0; last = 0;
    while (isi.size() < 12) begin
      @(negedge clk) b_start = 1'b1;
      @(negedge clk) b_start = 1'b0;
      while (!b_done) @(negedge clk);
      n++;
      if (b_spike) begin
        if (last != 0) isi.push_back(n - last);
        last = n;
      end
    end
  end

  initial begin
    real cps_un, sps_un, csp_un, cps, sps, csp, prev_csp, te;
    i_in = '0; delta = '0;
    repeat (3) @(negedge clk);

    measure(16.0, 0.0, 1'b0, 5, cps_un, sps_un, csp_un);
    $display("I=16 unmodified   : %8.0f clocks/spike, %6.1f steps/spike, %5.1f%% skipped",
             cps_un, sps_un, csp_un);
    check(csp_un == 0.0, "unmodified neuron skipped a computation");
    for (int k = 0; k < 5; k++) begin
      measure(16.0, d16[k], 1'b1, 5, cps, sps, csp);
      $display("I=16 delta=%7.5f : %8.0f clocks/spike, %6.1f steps/spike, %5.1f%% skipped, %5.1f%% faster",
               d16[k], cps, sps, csp, 100.0 * (cps_un - cps) / cps_un);
      check(cps <= cps_un * 1.02, "duplex neuron slower than unmodified");
      if (k == 4) check(cps < 0.8 * cps_un, "delta=1/8 saves less than 20%");
    end

    measure(6.0, 0.0, 1'b0, 3, cps_un, sps_un, csp_un);
    $display("I=6  unmodified   : %8.0f clocks/spike, %6.1f steps/spike", cps_un, sps_un);
    prev_csp = -1.0;
    for (int k = 0; k < 6; k++) begin
      measure(6.0, d4[k], 1'b1, 3, cps, sps, csp);
      te = 100.0 * (sps > sps_un ? sps - sps_un : sps_un - sps) / sps_un;
      $display("I=6  delta=%5.3f   : %5.1f%% skipped, period error %5.2f%%", d4[k], csp, te);
      check(csp >= prev_csp - 1.0, "skipped share falls as delta grows");
      prev_csp = csp;
    end
    check(prev_csp > 50.0, "delta=0.2 skips less than half the computations");

    wait (isi.size() >= 12);
    begin
      int mn, mx;
      mn = isi[0]; mx = isi[0];
      foreach (isi[i]) begin
        if (isi[i] < mn) mn = isi[i];
        if (isi[i] > mx) mx = isi[i];
      end
      $display("bursting neuron inter-spike intervals: shortest %0d, longest %0d steps", mn, mx);
      check(mx > 3 * mn, "bursting neuron does not burst");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
