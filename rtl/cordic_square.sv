// cordic_square: squares a Q16.14 number with a linear-mode CORDIC.
//
// Linear (multiplying) CORDIC drives z from the multiplier towards zero in
// steps of +-2^-i while adding +-x*2^-i to y, so y ends as x*z0. Here the
// multiplier is x itself, giving y = x^2. Iterations run for
// i = -NEG_IT .. FRAC; starting at a negative i (a left shift) widens the
// convergence range to |x| < 2^(NEG_IT+1), which covers the membrane
// potential (about -90 to +45 mV). The input is clipped to that range.
// One iteration per clock: the clock edge that sees `start` loads the
// operand, the next NEG_IT + FRAC + 1 = 21 edges iterate, and `done` is high
// for one cycle after the last of them.
// Error: |x| * 2^-FRAC from the residual of z, plus the truncation of the
// right-shifted x terms.
//
// The neuron takes its square from a CORDIC; the iteration range, the clipping
// and the single-iteration-per-clock form are this design's choices.
module cordic_square
  import izh_pkg::*;
#(
  parameter int unsigned NEG_IT = 6     // iterations with a left shift (i < 0)
) (
  input  logic clk,
  input  logic rst_n,
  input  logic start,
  input  fix_t x,
  output logic busy,
  output logic done,
  output fix_t y        // x*x, valid with done and held afterwards
);

  localparam int unsigned N_IT = NEG_IT + FRAC + 1;
  localparam int          GW   = WORD + 2;          // guard bits for y and z
  typedef logic signed [GW-1:0] gfix_t;

  localparam gfix_t XMAX = gfix_t'((64'sd1 <<< (NEG_IT + 1 + FRAC)) - 1);

  gfix_t xr, yr, zr;
  logic [$clog2(N_IT+1)-1:0] it;

  // shift of x and step of z for iteration number `it` (i = it - NEG_IT)
  gfix_t x_term, z_step;
  always_comb begin
    if (int'(it) < int'(NEG_IT)) begin
      x_term = xr <<< (int'(NEG_IT) - int'(it));
      z_step = gfix_t'(1) <<< (int'(FRAC + NEG_IT) - int'(it));
    end else begin
      x_term = xr >>> (int'(it) - int'(NEG_IT));
      z_step = gfix_t'(1) <<< (int'(FRAC + NEG_IT) - int'(it));
    end
  end

  gfix_t xin;
  always_comb begin
    xin = gfix_t'(x);
    if (xin > XMAX)       xin = XMAX;
    else if (xin < -XMAX) xin = -XMAX;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      xr   <= '0;
      yr   <= '0;
      zr   <= '0;
      it   <= '0;
      busy <= 1'b0;
      done <= 1'b0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          xr   <= xin;
          zr   <= xin;
          yr   <= '0;
          it   <= '0;
          busy <= 1'b1;
        end
      end else begin
        if (!zr[GW-1]) begin           // z >= 0: d = +1
          yr <= yr + x_term;
          zr <= zr - z_step;
        end else begin                 // z < 0: d = -1
          yr <= yr - x_term;
          zr <= zr + z_step;
        end
        if (int'(it) == N_IT - 1) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
        it <= it + 1'b1;
      end
    end
  end

  assign y = fix_t'(yr);

endmodule
