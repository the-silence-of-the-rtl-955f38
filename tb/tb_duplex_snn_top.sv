// tb_duplex_snn_top: runs the whole 42-7-1 network at its default sizes.
//
// Weights are set by hand so that the network separates the letters E and H
// on a 6-wide, 7-high pixel grid: every hidden neuron is excited by the
// pixels only E has (top and bottom bars) and inhibited by the pixels only
// H has (right column); the output neuron sums the hidden layer. The test
// presents E, then H, then E with unmodified neurons, and checks that the
// output neuron fires for E and stays silent for H. Along the way it checks
// the DAC code of the probed neuron at every step, decodes the UART line
// and matches each packet against the probed potentials, and counts the
// mechanisms: full and quasi-static neuron steps, barrier waits, spikes in
// every layer, and a switch to unmodified neurons. It also compares the
// clocks the network needs for 1200 steps of E with duplex and with
// unmodified neurons. A mechanism that never
// happens is a failure.
module tb_duplex_snn_top;
  import izh_pkg::*;

  localparam int NIN = 42, NHID = 7;
  localparam int CPB = 434;

  logic clk = 1'b0, rst_n = 1'b0, run = 1'b0, duplex_en = 1'b1;
  fix_t delta, i_stim, out_v, probe_v;
  logic [NIN-1:0] pattern;
  logic w_we = 1'b0, w_layer = 1'b0;
  logic [15:0] w_addr;
  logic signed [15:0] w_data;
  logic [5:0] probe_sel;
  logic [NIN-1:0] spikes_in;
  logic [NHID-1:0] spikes_hid;
  logic out_spike, uart_txd;
  logic [11:0] dac_code;
  logic [31:0] step_count, wait_count, full_count, qs_count, out_spike_count;
  int checks = 0, failures = 0;

  duplex_snn_top dut (
    .clk(clk), .rst_n(rst_n), .run(run), .duplex_en(duplex_en), .delta(delta),
    .i_stim(i_stim), .pattern(pattern), .w_we(w_we), .w_layer(w_layer),
    .w_addr(w_addr), .w_data(w_data), .probe_sel(probe_sel),
    .spikes_in(spikes_in), .spikes_hid(spikes_hid), .out_spike(out_spike),
    .out_v(out_v), .probe_v(probe_v), .dac_code(dac_code), .uart_txd(uart_txd),
    .step_count(step_count), .wait_count(wait_count), .full_count(full_count),
    .qs_count(qs_count), .out_spike_count(out_spike_count));

  always #5 clk = ~clk;

  initial begin
    repeat (4000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // 6x7 letters, pixel index = row*6 + column
  function automatic logic [NIN-1:0] letter(input bit is_e);
    logic [NIN-1:0] p;
    p = '0;
    for (int r = 0; r < 7; r++)
      for (int c = 0; c < 6; c++)
        if (is_e) p[r*6+c] = (r == 0 || r == 3 || r == 6 || c == 0);
        else      p[r*6+c] = (c == 0 || c == 5 || r == 3);
    return p;
  endfunction

  // ---- per-step monitors, sampled on the falling edge after a step
  // completes (step_count has just advanced; neurons have not started the
  // next step yet) ----
  int n_in_spk = 0, n_hid_spk = 0, n_out_spk = 0;
  logic [31:0] last_steps = '0;
  fix_t seen [$];
  always @(negedge clk) if (rst_n && step_count != last_steps) begin
    int exp_code;
    n_in_spk  += $countones(spikes_in);
    n_hid_spk += $countones(spikes_hid);
    n_out_spk += int'(out_spike);
    // DAC code: potential in 1/16 mV steps, offset 2048, clipped to 0..4095
    exp_code = int'($floor(real'(probe_v) / 1024.0)) + 2048;
    if (exp_code < 0) exp_code = 0;
    if (exp_code > 4095) exp_code = 4095;
    checks++;
    if (int'(dac_code) != exp_code) begin
      failures++; $display("FAIL dac %0d want %0d", dac_code, exp_code);
    end
    last_steps = step_count;
    // a packet carries one of these samples; a packet lasts about 650 steps
    seen.push_back(probe_v);
    if (seen.size() > 2000) void'(seen.pop_front());
  end

  // ---- UART receiver ----
  int packets = 0;
  initial begin
    logic [7:0] b [5];
    @(posedge rst_n);
    forever begin
      for (int n = 0; n < 5; n++) begin
        @(negedge uart_txd);
        repeat (CPB/2) @(posedge clk);
        for (int k = 0; k < 8; k++) begin
          repeat (CPB) @(posedge clk);
          b[n][k] = uart_txd;
        end
        repeat (CPB) @(posedge clk);
      end
      begin
        logic [31:0] w;
        logic found;
        w = {b[1], b[2], b[3], b[4]};
        found = 1'b0;
        foreach (seen[i]) if ({{2{seen[i][29]}}, seen[i]} == w) found = 1'b1;
        checks++;
        if (b[0] != 8'hA5 || !found) begin
          failures++; $display("FAIL uart packet %h %h", b[0], w);
        end
        packets++;
      end
    end
  end

  task automatic write_w(input logic layer, input int addr, input int val);
    @(negedge clk);
    w_we = 1'b1; w_layer = layer; w_addr = 16'(addr); w_data = 16'(val);
    @(negedge clk) w_we = 1'b0;
  endtask

  task automatic present(input logic [NIN-1:0] p, input int steps, output int out_spk,
                         output int clks);
    int s0, o0;
    pattern = p;
    s0 = int'(step_count);
    o0 = int'(out_spike_count);
    clks = 0;
    while (int'(step_count) < s0 + steps) begin @(negedge clk); clks++; end
    out_spk = int'(out_spike_count) - o0;
  endtask

  initial begin
    logic [NIN-1:0] pe, ph;
    int oe, oh, oe2, f0, q0, w0, f1, q1, ce, ch, ce2;
    pe = letter(1'b1);
    ph = letter(1'b0);
    delta = to_fix(0.125);
    i_stim = to_fix(16.0);
    pattern = '0;
    probe_sel = 6'd49;              // output neuron
    w_addr = '0; w_data = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    // weights: 8.0 = 2048 with 8 fraction bits
    for (int j = 0; j < NHID; j++)
      for (int i = 0; i < NIN; i++)
        write_w(1'b0, j*NIN + i, (pe[i] && !ph[i]) ? 2048 : (ph[i] && !pe[i]) ? -4096 : 0);
    for (int j = 0; j < NHID; j++) write_w(1'b1, j, 2048);

    run = 1'b1;
    present(pe, 1200, oe, ce);
    f0 = int'(full_count); q0 = int'(qs_count); w0 = int'(wait_count);
    present(ph, 1200, oh, ch);
    probe_sel = 6'd0;               // an input neuron for the second E
    duplex_en = 1'b0;               // unmodified neurons
    f1 = int'(full_count); q1 = int'(qs_count);
    present(pe, 1200, oe2, ce2);
    run = 1'b0;
    repeat (50) @(negedge clk);

    $display("steps %0d, output spikes: E %0d, H %0d, E (unmodified) %0d",
             step_count, oe, oh, oe2);
    $display("duplex: full %0d, quasi-static %0d neuron steps (%0.1f%% saved); unmodified: full %0d, quasi-static %0d",
             f1, q1, 100.0 * real'(q1) / real'(f1 + q1),
             int'(full_count) - f1, int'(qs_count) - q1);
    $display("spikes: input %0d hidden %0d output %0d; barrier wait clocks %0d; uart packets %0d",
             n_in_spk, n_hid_spk, n_out_spk, wait_count, packets);
    $display("clocks for 1200 steps of E: duplex %0d, unmodified %0d (%0.2f times faster)",
             ce, ce2, real'(ce2) / real'(ce));
    checks++; if (!(ce < ce2)) begin failures++; $display("FAIL duplex network not faster"); end
    checks++; if (oe == 0)  begin failures++; $display("FAIL no output spike for E"); end
    checks++; if (oh != 0)  begin failures++; $display("FAIL output spiked for H"); end
    checks++; if (oe2 == 0) begin failures++; $display("FAIL no output spike for E, unmodified"); end
    checks++; if (int'(qs_count) - q1 != 0) begin failures++; $display("FAIL quasi-static step while unmodified"); end
    // mechanisms
    checks++; if (f1 == 0)        begin failures++; $display("FAIL never a full step"); end
    checks++; if (q1 == 0)        begin failures++; $display("FAIL never a quasi-static step"); end
    checks++; if (wait_count == 0) begin failures++; $display("FAIL never a barrier wait"); end
    checks++; if (n_in_spk == 0 || n_hid_spk == 0 || n_out_spk == 0) begin failures++; $display("FAIL a layer never spiked"); end
    checks++; if (packets < 3)    begin failures++; $display("FAIL too few uart packets"); end
    // run is dropped during the last step, which still completes
    checks++; if (int'(step_count) != 3601) begin failures++; $display("FAIL step count %0d", step_count); end
    checks++; if (full_count + qs_count != step_count * 50) begin failures++; $display("FAIL neuron step total"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
