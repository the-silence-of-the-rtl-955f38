// synapse_layer: all-to-all weighted connections from one layer of neurons
// to the next, turning the spikes of the pre-synaptic layer into the input
// current of each post-synaptic neuron.
//
// Each post-synaptic neuron j has a current register i_syn[j]. On every
// `tick` (one network time step, after all neurons of the step are done)
//   i_syn[j] <= i_syn[j] - (i_syn[j] >>> TAU_SHIFT) + sum_i pre_spike[i] * w[j][i]
// i.e. a first-order decaying synaptic current with time constant
// 2^TAU_SHIFT steps (0.5 ms at dt = 1/32 ms), kicked by each spike.
// Weights are signed W_WIDTH-bit numbers with W_FRAC fraction bits in
// current units, held in registers and written one at a time through the
// w_we / w_addr / w_data port (address j*N_PRE + i); reset clears weights
// and currents. i_syn is registered and changes only on tick.
//
// The layer sizes come from the network this design implements (42-7-1);
// the synapse model, weight format and loading port are this design's own
// choices, since the learning rule that produced the weights is external.
module synapse_layer
  import izh_pkg::*;
#(
  parameter int unsigned N_PRE     = 42,
  parameter int unsigned N_POST    = 7,
  parameter int unsigned W_WIDTH   = 16,
  parameter int unsigned W_FRAC    = 8,
  parameter int unsigned TAU_SHIFT = 4,
  parameter int unsigned AW        = $clog2(N_PRE * N_POST)
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      tick,
  input  logic [N_PRE-1:0]          pre_spike,
  input  logic                      w_we,
  input  logic [AW-1:0]             w_addr,
  input  logic signed [W_WIDTH-1:0] w_data,
  output fix_t                      i_syn [N_POST]
);

  logic signed [W_WIDTH-1:0] w [N_POST*N_PRE];
  fix_t                      drive [N_POST];

  // weighted sum of this step's spikes, in Q16.14
  always_comb begin
    for (int j = 0; j < N_POST; j++) begin
      drive[j] = '0;
      for (int i = 0; i < N_PRE; i++)
        if (pre_spike[i])
          drive[j] = drive[j] + (fix_t'(w[j*N_PRE + i]) <<< (FRAC - W_FRAC));
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < N_POST*N_PRE; k++) w[k] <= '0;
      for (int j = 0; j < N_POST; j++) i_syn[j] <= '0;
    end else begin
      if (w_we && int'(w_addr) < N_POST*N_PRE) w[w_addr] <= w_data;
      if (tick)
        for (int j = 0; j < N_POST; j++)
          i_syn[j] <= i_syn[j] - (i_syn[j] >>> TAU_SHIFT) + drive[j];
    end
  end

endmodule
