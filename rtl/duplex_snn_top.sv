// duplex_snn_top: a three-layer spiking network of duplex Izhikevich neurons
// (42 input neurons, 7 hidden, 1 output) that tells two 6x7-pixel letter
// patterns apart, with a serial sample stream and a DAC code of one probed
// neuron.
//
// Every neuron is its own duplex_neuron instance, so all 50 neurons advance
// one Euler step in parallel. Input neuron k receives the current i_stim
// while pattern[k] is 1 and none otherwise. Hidden and output neurons receive
// the decaying synaptic currents of two synapse_layer blocks (42->7 and 7->1).
// net_ctrl starts each time step in all neurons, waits for the slowest one,
// and then ticks the synapses with that step's spikes. Quasi-static neurons
// finish early and wait; the step lasts as long as the slowest neuron.
//
// Weights come from off-chip training and are written through
// w_we/w_layer/w_addr/w_data (layer 0: input->hidden, address
// hidden*42 + input; layer 1: hidden->output, address = hidden index).
// probe_sel picks one neuron (0..41 input, 42..48 hidden, 49 output): its
// membrane potential drives probe_v, the 12-bit code for an external DAC
// (v in [-128, 128) mV mapped linearly to 0..4095, clipped) and, one sample
// per packet, the UART stream (see sample_streamer). Counters report time
// steps, full and quasi-static neuron steps, and barrier wait clocks.
// The network shape follows the design; the input coding, synapse model,
// probe and counters are this design's own choices.
module duplex_snn_top
  import izh_pkg::*;
#(
  parameter int unsigned N_IN         = 42,
  parameter int unsigned N_HID        = 7,
  parameter int unsigned CLKS_PER_BIT = 434,
  parameter int unsigned W_WIDTH      = 16
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      run,          // keep stepping
  input  logic                      duplex_en,    // 0: unmodified neurons
  input  fix_t                      delta,        // quasi-static threshold
  input  fix_t                      i_stim,       // current of an active pixel
  input  logic [N_IN-1:0]           pattern,
  input  logic                      w_we,
  input  logic                      w_layer,
  input  logic [15:0]               w_addr,
  input  logic signed [W_WIDTH-1:0] w_data,
  input  logic [5:0]                probe_sel,
  output logic [N_IN-1:0]           spikes_in,    // spikes of the last step
  output logic [N_HID-1:0]          spikes_hid,
  output logic                      out_spike,
  output fix_t                      out_v,
  output fix_t                      probe_v,
  output logic [11:0]               dac_code,
  output logic                      uart_txd,
  output logic [31:0]               step_count,
  output logic [31:0]               wait_count,
  output logic [31:0]               full_count,   // neuron steps with alpha/beta recomputed
  output logic [31:0]               qs_count,     // quasi-static neuron steps
  output logic [31:0]               out_spike_count
);

  localparam int unsigned N = N_IN + N_HID + 1;
  localparam int unsigned AW1 = $clog2(N_IN * N_HID);
  localparam int unsigned AW2 = (N_HID > 1) ? $clog2(N_HID) : 1;

  logic         start, tick, ctrl_busy;
  logic [N-1:0] n_done, n_spike, n_full;
  fix_t         n_v [N];
  fix_t         n_i [N];
  fix_t         i_hid [N_HID];
  fix_t         i_out [1];

  // ---------------- neurons ----------------
  for (genvar k = 0; k < int'(N); k++) begin : g_neuron
    fix_t u_unused, a_unused, b_unused;
    logic ready_unused;
    duplex_neuron u_n (
      .clk(clk), .rst_n(rst_n), .start(start), .i_in(n_i[k]),
      .delta(delta), .duplex_en(duplex_en), .ready(ready_unused),
      .done(n_done[k]), .spike(n_spike[k]), .step_full(n_full[k]),
      .v(n_v[k]), .u(u_unused), .alpha(a_unused), .beta(b_unused)
    );
  end

  always_comb begin
    for (int k = 0; k < int'(N_IN); k++) n_i[k] = pattern[k] ? i_stim : '0;
    for (int k = 0; k < int'(N_HID); k++) n_i[N_IN + k] = i_hid[k];
    n_i[N-1] = i_out[0];
  end

  assign spikes_in  = n_spike[N_IN-1:0];
  assign spikes_hid = n_spike[N_IN +: N_HID];
  assign out_spike  = n_spike[N-1];
  assign out_v      = n_v[N-1];

  // ---------------- synapses ----------------
  synapse_layer #(.N_PRE(N_IN), .N_POST(N_HID), .W_WIDTH(W_WIDTH)) u_syn1 (
    .clk(clk), .rst_n(rst_n), .tick(tick), .pre_spike(spikes_in),
    .w_we(w_we && !w_layer), .w_addr(w_addr[AW1-1:0]), .w_data(w_data),
    .i_syn(i_hid)
  );

  synapse_layer #(.N_PRE(N_HID), .N_POST(1), .W_WIDTH(W_WIDTH)) u_syn2 (
    .clk(clk), .rst_n(rst_n), .tick(tick), .pre_spike(spikes_hid),
    .w_we(w_we && w_layer), .w_addr(w_addr[AW2-1:0]), .w_data(w_data),
    .i_syn(i_out)
  );

  // ---------------- step sequencing ----------------
  net_ctrl #(.N(N)) u_ctrl (
    .clk(clk), .rst_n(rst_n), .run(run), .n_done(n_done), .start(start),
    .tick(tick), .busy(ctrl_busy), .step_count(step_count),
    .wait_count(wait_count)
  );

  // per-step statistics, taken when the step is complete
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      full_count      <= '0;
      qs_count        <= '0;
      out_spike_count <= '0;
    end else if (tick) begin
      full_count      <= full_count + 32'($countones(n_full));
      qs_count        <= qs_count + 32'(N) - 32'($countones(n_full));
      out_spike_count <= out_spike_count + 32'(out_spike);
    end
  end

  // ---------------- probe, DAC code, UART ----------------
  always_comb begin
    probe_v = n_v[N-1];
    for (int k = 0; k < int'(N); k++)
      if (int'(probe_sel) == k) probe_v = n_v[k];
  end

  // v >>> 10 is v in units of 1/16 mV; offset by 2048 and clip to 12 bits
  fix_t dac_lin;
  always_comb begin
    dac_lin = (probe_v >>> 10) + fix_t'(2048);
    if (dac_lin < 0)          dac_code = 12'd0;
    else if (dac_lin > 4095)  dac_code = 12'd4095;
    else                      dac_code = dac_lin[11:0];
  end

  logic       s_busy, b_valid, b_ready;
  logic [7:0] b_data;
  logic [31:0] sent_unused;

  sample_streamer u_stream (
    .clk(clk), .rst_n(rst_n), .sample_valid(tick), .sample(probe_v),
    .busy(s_busy), .byte_valid(b_valid), .byte_data(b_data),
    .byte_ready(b_ready), .sent_count(sent_unused)
  );

  uart_tx #(.CLKS_PER_BIT(CLKS_PER_BIT)) u_uart (
    .clk(clk), .rst_n(rst_n), .tx_valid(b_valid), .tx_data(b_data),
    .tx_ready(b_ready), .txd(uart_txd)
  );

endmodule
