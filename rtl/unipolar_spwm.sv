// unipolar_spwm: sine-triangle PWM with unipolar switching.
//
// Two references are compared with one shared triangular carrier: leg a with
// v* (table pointer starting at 0) and leg b with the opposite reference -v*
// (a second table pointer starting START_B samples ahead). Each leg's upper
// switch conducts while the carrier is below its reference, and the lower
// switch is its complement. Because the legs switch independently, the load
// voltage takes three values: +V_in (S11, S22), 0 (both upper or both lower
// switches on) and -V_in (S12, S21). The output ripple is at twice the
// carrier frequency, which lowers the load-current distortion compared with
// bipolar switching.
//
// Defaults follow the original controller: 100 MHz clock, carrier 5 or
// 10 kHz, 600-sample reference of 49.99 Hz with m_a = 0.8, and the second
// pointer starting at 299 (one sample short of an exact half period, which
// would be 300). Each leg's complementary pair goes through dead_time (4 us),
// in place of the original's fixed comparison offset.
//
// Timing: comparisons are registered, then the dead_time delay applies.
// `carrier`, `ref_a` and `ref_b` are brought out for observation.
module unipolar_spwm
  import spwm_pkg::*;
#(
  parameter int unsigned START_B     = 299,
  parameter int unsigned DEAD_CYCLES = 400
) (
  input  logic           clk,
  input  logic           rst,
  input  logic           switch_fast,
  output hbridge_gates_t gates,
  output level_t         carrier,
  output level_t         ref_a,
  output level_t         ref_b
);

  logic leg_a_up;  // 1: S11 should conduct
  logic leg_b_up;  // 1: S21 should conduct

  triangle_carrier u_carrier (
    .clk, .rst, .switch_fast, .carrier,
    .period_start(), .fast_active()
  );

  sine_reference u_ref_a (
    .clk, .rst, .ref_level(ref_a), .index(), .wrap()
  );

  sine_reference #(.START_INDEX(START_B)) u_ref_b (
    .clk, .rst, .ref_level(ref_b), .index(), .wrap()
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      leg_a_up <= 1'b0;
      leg_b_up <= 1'b0;
    end else begin
      leg_a_up <= (carrier < ref_a);
      leg_b_up <= (carrier < ref_b);
    end
  end

  dead_time #(.DEAD_CYCLES(DEAD_CYCLES)) u_leg_a (
    .clk, .rst, .cmd(leg_a_up), .upper(gates.s11), .lower(gates.s12)
  );
  dead_time #(.DEAD_CYCLES(DEAD_CYCLES)) u_leg_b (
    .clk, .rst, .cmd(leg_b_up), .upper(gates.s21), .lower(gates.s22)
  );

endmodule
