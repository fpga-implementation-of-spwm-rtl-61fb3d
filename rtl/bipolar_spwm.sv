// bipolar_spwm: sine-triangle PWM with bipolar switching.
//
// One sinusoidal reference v* (sine_reference) is compared with the
// triangular carrier v_p (triangle_carrier). While v_p < v* the diagonal pair
// S11/S22 conducts and the load sees +V_in; otherwise S12/S21 conducts and it
// sees -V_in. The output therefore only takes the two values +V_in and -V_in.
// Leg b's command is the inverse of leg a's, and each leg has its own
// dead_time block.
//
// With the defaults: 100 MHz clock, carrier 5 kHz (switch_fast = 0) or
// 10 kHz (switch_fast = 1), reference 49.99 Hz with m_a = 0.8, dead time
// 4 us. The comparison and the numbers follow the original controller; the
// dead-time insertion on this modulator is this design's addition, following
// the document's requirement of 4 us on every leg.
//
// Timing: the comparison is registered (one clock after the carrier and
// reference registers), then the dead_time delay applies. `carrier` and
// `ref_a` are brought out for observation.
module bipolar_spwm
  import spwm_pkg::*;
#(
  parameter int unsigned DEAD_CYCLES = 400
) (
  input  logic           clk,
  input  logic           rst,
  input  logic           switch_fast,
  output hbridge_gates_t gates,
  output level_t         carrier,
  output level_t         ref_a
);

  logic leg_a_up;  // 1: S11 (and S22) should conduct

  triangle_carrier u_carrier (
    .clk, .rst, .switch_fast, .carrier,
    .period_start(), .fast_active()
  );

  sine_reference u_ref (
    .clk, .rst, .ref_level(ref_a), .index(), .wrap()
  );

  always_ff @(posedge clk) begin
    if (rst) leg_a_up <= 1'b0;
    else     leg_a_up <= (carrier < ref_a);
  end

  dead_time #(.DEAD_CYCLES(DEAD_CYCLES)) u_leg_a (
    .clk, .rst, .cmd(leg_a_up),  .upper(gates.s11), .lower(gates.s12)
  );
  dead_time #(.DEAD_CYCLES(DEAD_CYCLES)) u_leg_b (
    .clk, .rst, .cmd(!leg_a_up), .upper(gates.s21), .lower(gates.s22)
  );

endmodule
