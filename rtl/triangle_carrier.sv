// triangle_carrier: symmetric triangular carrier v_p for sine-triangle PWM.
//
// The carrier rises from 0 by STEP each clock for HALF cycles, reaching
// HALF*STEP = 20000, then falls back by the same step for HALF cycles. The
// carrier-select input picks one of two settings taken from the original
// controller: HALF = 10000, STEP = 2 (period 20000 cycles, 5 kHz at 100 MHz)
// or HALF = 5000, STEP = 4 (period 10000 cycles, 10 kHz). Both reach the same
// peak, so the modulation index does not change with the carrier frequency.
//
// Value in cycle n of a period: carrier = STEP * min(n, 2*HALF - n).
//
// Timing: `period_start` is high in the cycle where the carrier is 0 at the
// start of a period. `switch_fast` is sampled at the last cycle of a period
// (and during reset) and takes effect with the next period, so a change never
// breaks a triangle; `fast_active` shows the setting in use. The exact 2*HALF
// period and the period-boundary sampling are this design's choices; the
// original held the bottom value one extra cycle and reloaded the setting
// every clock.
module triangle_carrier
  import spwm_pkg::*;
#(
  parameter int unsigned HALF_SLOW = 10000,
  parameter int unsigned STEP_SLOW = 2,
  parameter int unsigned HALF_FAST = 5000,
  parameter int unsigned STEP_FAST = 4
) (
  input  logic   clk,
  input  logic   rst,
  input  logic   switch_fast,
  output level_t carrier,
  output logic   period_start,
  output logic   fast_active
);

  localparam int unsigned HALF_MAX = (HALF_SLOW > HALF_FAST) ? HALF_SLOW : HALF_FAST;
  localparam int unsigned CW       = $clog2(2 * HALF_MAX);

  logic [CW-1:0] cnt;
  logic [CW-1:0] half;
  logic [CW-1:0] last;
  level_t        step;

  always_comb begin
    half = fast_active ? CW'(HALF_FAST) : CW'(HALF_SLOW);
    step = fast_active ? LEVEL_W'(STEP_FAST) : LEVEL_W'(STEP_SLOW);
    last = CW'(2 * half - 1);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      cnt         <= '0;
      carrier     <= '0;
      fast_active <= switch_fast;
    end else if (cnt == last) begin
      cnt         <= '0;
      carrier     <= '0;
      fast_active <= switch_fast;
    end else begin
      cnt <= cnt + 1'b1;
      if (cnt < half) carrier <= carrier + step;
      else            carrier <= carrier - step;
    end
  end

  assign period_start = (cnt == '0);

endmodule
