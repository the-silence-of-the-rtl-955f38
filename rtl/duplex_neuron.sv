// duplex_neuron: one Izhikevich neuron, solved by forward Euler, with the
// "duplex" shortcut that skips the expensive terms while the membrane
// potential barely moves.
//
// Each Euler step (dt = 1/32 ms) computes
//   v[n+1] = v + (alpha + 5v + I) * dt
//   u[n+1] = u + beta * dt
//   alpha  = 0.04 v^2 + 140 - u        beta = a (b v - u)
// followed by the after-spike reset: if v[n+1] > V_PEAK then v <- V_RESET,
// u <- u[n+1] + D.
// alpha and beta, which hold the square and the constant multiplications,
// are kept in registers. They are recomputed (a "full" step) only when the
// previous step moved v by more than `delta` (|v[n+1]-v[n]| > delta, the
// firing state), after a spike or reset, and on every step started while
// `duplex_en` is low (the unmodified neuron). Otherwise (the quasi-static
// state) the step reuses the stored alpha and beta and takes only the short
// update path. Since v[n+1]-v[n] is exactly (alpha+5v+I)*dt, the comparison
// needs no extra subtraction. This is the published duplex scheme.
//
// A full step is also forced after MAX_QS quasi-static steps in a row. With
// alpha frozen, an update smaller than one LSB (|alpha+5v+I| < 2^-9) leaves
// v exactly unchanged, so the delta test could never fire again and the
// neuron would stall while u drifts on a stale beta. The refresh is this
// design's own guard against that fixed-point dead zone.
//
// Schedule (this design's own; at most two additions run in any cycle
// besides the CORDIC's own adders):
//   full step:  CORDIC v^2 (21 clk) in parallel with beta = a(bv-u) on the
//               serial constant multiplier and p = 140-u; then
//               alpha = p + 0.04 v^2 on the serial multiplier (3 clk)
//   every step: U1 s0=alpha+4v, s1=v+I | U2 s0=s0+s1, un=u+beta*dt
//               U3 vn=v+s0*dt, ud=un+D | WB write back, compare, done
// Interface: pulse `start` while `ready`; `i_in` is captured with it.
// `done` pulses one clock after write back with v, u, spike and
// `step_full` (this step recomputed alpha/beta) valid. `done` rises on the
// 4th clock edge after the one that accepts start for a quasi-static step
// and on the 31st for a full step; `ready` is already high in the done
// cycle, so back-to-back steps take 5 or 32 clocks.
// Constants a, b and 0.04 are shift-and-add masks (see izh_pkg); the
// reset values c = -65 and d = 6 (tonic spiking) are parameters.
module duplex_neuron
  import izh_pkg::*;
#(
  parameter cmask_t MASK_AC = MASK_A,            // a = 0.02
  parameter cmask_t MASK_BC = MASK_B,            // b = 0.2
  parameter fix_t   V_PEAK  = to_fix(30.0),      // spike cut-off (mV)
  parameter fix_t   V_RESET = to_fix(-65.0),     // c
  parameter fix_t   D_RESET = to_fix(6.0),       // d
  parameter fix_t   U_INIT  = to_fix(-13.0),     // b*c
  parameter int unsigned MAX_QS = 64             // forced refresh after this
                                                 // many quasi-static steps
) (
  input  logic clk,
  input  logic rst_n,
  input  logic start,       // begin one Euler step (accepted when ready)
  input  fix_t i_in,        // input current
  input  fix_t delta,       // quasi-static threshold, >= 0
  input  logic duplex_en,   // 0: recompute alpha/beta every step
  output logic ready,
  output logic done,        // one-cycle pulse: step finished
  output logic spike,       // with done: this step fired
  output logic step_full,   // with done: alpha/beta recomputed this step
  output fix_t v,
  output fix_t u,
  output fix_t alpha,
  output fix_t beta
);

  localparam fix_t K140 = to_fix(140.0);

  typedef enum logic [2:0] {
    S_IDLE, S_FULL, S_ALPHA, S_U1, S_U2, S_U3, S_WB
  } state_t;

  state_t state;
  logic   recompute;              // next step must be a full step
  fix_t   i_r, s0, s1, un, vn, ud, p;
  logic   sq_ok;                  // CORDIC result captured
  logic [1:0] bphase;             // 0: b*v-u, 1: a*w, 2: beta ready
  fix_t   sq;

  // ---- serial constant multiplier (shared by beta and alpha) ----
  logic   cm_start, cm_busy, cm_done;
  fix_t   cm_x, cm_init, cm_res;
  cmask_t cm_mask;

  const_mult_serial u_cm (
    .clk(clk), .rst_n(rst_n), .start(cm_start), .x(cm_x), .mask(cm_mask),
    .init(cm_init), .busy(cm_busy), .done(cm_done), .result(cm_res)
  );

  // ---- CORDIC squarer ----
  logic sq_start, sq_busy, sq_done;
  fix_t sq_y;

  cordic_square u_sq (
    .clk(clk), .rst_n(rst_n), .start(sq_start), .x(v),
    .busy(sq_busy), .done(sq_done), .y(sq_y)
  );

  logic full_go;
  logic [$clog2(MAX_QS+1)-1:0] qs_run;   // consecutive quasi-static steps
  logic need_full;
  assign need_full = recompute || !duplex_en || (int'(qs_run) >= MAX_QS);
  assign full_go   = (state == S_IDLE) && start && need_full;

  always_comb begin
    cm_start = 1'b0;
    cm_x     = v;
    cm_mask  = MASK_BC;
    cm_init  = -u;
    sq_start = full_go;
    if (full_go) begin
      cm_start = 1'b1;                       // w = b*v - u
    end else if (state == S_FULL && cm_done && bphase == 2'd0) begin
      cm_start = 1'b1;                       // beta = a*w
      cm_x     = cm_res;
      cm_mask  = MASK_AC;
      cm_init  = '0;
    end else if (state == S_FULL && sq_ok && bphase == 2'd2) begin
      cm_start = 1'b1;                       // alpha = p + 0.04*v^2
      cm_x     = sq;
      cm_mask  = MASK_004;
      cm_init  = p;
    end
  end

  fix_t dv;
  logic fired;
  assign dv    = s0 >>> DT_SHIFT;
  assign fired = (vn > V_PEAK);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      recompute <= 1'b1;
      qs_run    <= '0;
      v         <= V_RESET;
      u         <= U_INIT;
      alpha     <= '0;
      beta      <= '0;
      i_r       <= '0;
      s0        <= '0;
      s1        <= '0;
      un        <= '0;
      vn        <= '0;
      ud        <= '0;
      p         <= '0;
      sq        <= '0;
      sq_ok     <= 1'b0;
      bphase    <= '0;
      done      <= 1'b0;
      spike     <= 1'b0;
      step_full <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          i_r       <= i_in;
          step_full <= need_full;
          qs_run    <= need_full ? '0 : qs_run + 1'b1;
          if (need_full) begin
            state  <= S_FULL;
            sq_ok  <= 1'b0;
            bphase <= 2'd0;
          end else begin
            state  <= S_U1;
          end
        end
        S_FULL: begin
          if (sq_done) begin
            sq    <= sq_y;
            sq_ok <= 1'b1;
          end
          if (cm_done && bphase == 2'd0) begin
            bphase <= 2'd1;
            p      <= K140 - u;
          end
          if (cm_done && bphase == 2'd1) begin
            beta   <= cm_res;
            bphase <= 2'd2;
          end
          if (sq_ok && bphase == 2'd2) state <= S_ALPHA;   // alpha started
        end
        S_ALPHA: if (cm_done) begin
          alpha <= cm_res;
          state <= S_U1;
        end
        S_U1: begin
          s0    <= alpha + (v <<< 2);
          s1    <= v + i_r;
          state <= S_U2;
        end
        S_U2: begin
          s0    <= s0 + s1;
          un    <= u + (beta >>> DT_SHIFT);
          state <= S_U3;
        end
        S_U3: begin
          vn    <= v + dv;
          ud    <= un + D_RESET;
          state <= S_WB;
        end
        S_WB: begin
          v         <= fired ? V_RESET : vn;
          u         <= fired ? ud : un;
          spike     <= fired;
          recompute <= fired || (dv > delta) || (dv < -delta);
          done      <= 1'b1;
          state     <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign ready = (state == S_IDLE);

  // the arithmetic units are only started from an idle state
  a_cm_start: assert property (@(posedge clk) disable iff (!rst_n)
                               cm_start |-> !cm_busy);
  a_sq_start: assert property (@(posedge clk) disable iff (!rst_n)
                               sq_start |-> !sq_busy);

endmodule
