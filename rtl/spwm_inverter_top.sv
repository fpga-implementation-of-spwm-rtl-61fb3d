// spwm_inverter_top: FPGA gate controller for a single-phase H-bridge inverter.
//
// Holds the three control techniques side by side, all on the 100 MHz clock,
// the reset button and the carrier-select switch:
//   sq_gates  - symmetrical 180-degree square-wave control (50 Hz)
//   bip_gates - bipolar sine-triangle PWM (two-level output)
//   uni_gates - unipolar sine-triangle PWM (three-level output)
// Each group drives the four switches S11, S12 (leg a) and S21, S22 (leg b)
// of a bridge through its isolating gate-drive stage, and each leg carries a
// 4 us dead time. The original work loaded one technique at a time onto the
// FPGA; placing all three in one design, each with its own outputs, is this
// design's choice. switch_fast selects a 5 kHz (0) or 10 kHz (1) carrier for
// both sine-triangle modulators; rst is synchronous and active high.
module spwm_inverter_top
  import spwm_pkg::*;
(
  input  logic           clk,
  input  logic           rst,
  input  logic           switch_fast,
  output hbridge_gates_t sq_gates,
  output hbridge_gates_t bip_gates,
  output hbridge_gates_t uni_gates
);

  square_wave_gen u_square (
    .clk, .rst, .gates(sq_gates)
  );

  bipolar_spwm u_bipolar (
    .clk, .rst, .switch_fast, .gates(bip_gates),
    .carrier(), .ref_a()
  );

  unipolar_spwm u_unipolar (
    .clk, .rst, .switch_fast, .gates(uni_gates),
    .carrier(), .ref_a(), .ref_b()
  );

endmodule
