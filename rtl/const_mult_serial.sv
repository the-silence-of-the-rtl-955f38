// const_mult_serial: multiplies a Q16.14 operand by a constant coefficient
// built from powers of two, one shift-and-add per clock.
//
// The coefficient is a bit mask: bit k set adds the term 2^-k (bit 0 = 1.0).
// On `start` the accumulator is loaded with `init` and the operand and mask
// are captured. Each following cycle the lowest remaining set bit k of the
// mask is cleared and (x >>> k) is added to the accumulator, so the unit uses
// a single adder; `done` is high for one cycle, popcount(mask)+1 clocks after
// start (1 for an empty mask), with `result` = init + sum_k (x >>> k).
// Right shifts truncate toward minus infinity.
//
// Replacing constant multipliers by shift-and-add is how the neuron avoids
// general multipliers (0.04*v ~ (2^-5 + 2^-7 + 2^-11) v). Doing the terms one
// per cycle, and the `init` operand that folds one extra addition into the
// chain, are this design's choices so that the neuron needs few adders.
module const_mult_serial
  import izh_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   start,      // load operands; ignored while busy
  input  fix_t   x,          // operand
  input  cmask_t mask,       // coefficient terms (bit k -> 2^-k)
  input  fix_t   init,       // accumulator start value
  output logic   busy,
  output logic   done,       // one-cycle pulse, result valid
  output fix_t   result
);

  fix_t   acc;
  fix_t   xr;
  cmask_t rem;

  // index of lowest set bit of the remaining mask
  function automatic int unsigned lowest_bit(input cmask_t m);
    for (int unsigned k = 0; k < MASKW; k++)
      if (m[k]) return k;
    return 0;
  endfunction

  int unsigned k_now;
  cmask_t      rem_next;
  always_comb begin
    k_now    = lowest_bit(rem);
    rem_next = rem & (rem - cmask_t'(1));   // clear lowest set bit
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc  <= '0;
      xr   <= '0;
      rem  <= '0;
      busy <= 1'b0;
      done <= 1'b0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          acc  <= init;
          xr   <= x;
          rem  <= mask;
          busy <= (mask != '0);
          done <= (mask == '0);
        end
      end else begin
        acc <= acc + (xr >>> k_now);
        rem <= rem_next;
        if (rem_next == '0) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

  assign result = acc;

endmodule
