// net_ctrl: network time-step sequencer with a barrier on the slowest
// neuron.
//
// A duplex neuron finishes a quasi-static step in a few clocks but a full
// step takes several times longer, so neurons of one time step finish at
// different times. Spikes may only pass to the next layer once every
// neuron has finished the step, so this controller
//   1. pulses `start` to all N neurons (S_START),
//   2. collects their `done` pulses in a pending mask (S_WAIT); neurons that
//      finish early sit idle until the last one is done,
//   3. pulses `tick` for one clock (S_TICK) so the synapses take this step's
//      spikes, counts the step, and repeats while `run` is high.
// A time step therefore lasts 2 + the slowest neuron's step clocks.
// Counters: `step_count` time steps completed; `wait_count` clocks in which
// at least one neuron had finished and was waiting for others.
// Waiting for all neurons follows the network described for this neuron;
// the three-state sequence and the counters are this design's own.
module net_ctrl #(
  parameter int unsigned N = 50
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         run,
  input  logic [N-1:0] n_done,
  output logic         start,
  output logic         tick,
  output logic         busy,
  output logic [31:0]  step_count,
  output logic [31:0]  wait_count
);

  typedef enum logic [1:0] {S_IDLE, S_START, S_WAIT, S_TICK} state_t;
  state_t       state;
  logic [N-1:0] pending, pending_n;

  assign pending_n = pending & ~n_done;
  assign start     = (state == S_START);
  assign tick      = (state == S_TICK);
  assign busy      = (state != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      pending    <= '0;
      step_count <= '0;
      wait_count <= '0;
    end else begin
      unique case (state)
        S_IDLE:  if (run) state <= S_START;
        S_START: begin
          pending <= '1;
          state   <= S_WAIT;
        end
        S_WAIT: begin
          pending <= pending_n;
          if (pending != '1 && pending_n != '0) wait_count <= wait_count + 1;
          if (pending_n == '0) state <= S_TICK;
        end
        S_TICK: begin
          step_count <= step_count + 1;
          state      <= run ? S_START : S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // no neuron may report done outside a step
  a_done_in_step: assert property (@(posedge clk) disable iff (!rst_n)
                                   (n_done != '0) |-> (state == S_WAIT));

endmodule
