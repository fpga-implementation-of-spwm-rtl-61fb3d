// spwm_pkg: types and constants shared by the H-bridge PWM controllers.
//
// The controllers run from the 100 MHz programmable-logic clock of a Zynq-7000
// board. Every modulator drives the four switches of a single-phase full bridge
// (leg a: S11 upper, S12 lower; leg b: S21 upper, S22 lower). The carrier and
// reference values are unsigned integers on a 0..20000 scale, wide enough for
// the carrier peak.
//
// The sine table used by sine_reference is computed here at elaboration time:
//   table[k] = QUANT * round(MID/QUANT * (1 + sin(2*pi*k/N)))
// With MID = 8000, QUANT = 100 and N = 600 this gives the 600-entry table in
// steps of 100 from 0 to 16000 that the original controller stored as a
// constant array.
package spwm_pkg;

  localparam int unsigned LEVEL_W = 15;   // carrier/reference width, peak 20000

  typedef logic [LEVEL_W-1:0] level_t;

  // Gate commands of the four bridge switches, 1 = switch conducts.
  typedef struct packed {
    logic s11;  // leg a, upper
    logic s12;  // leg a, lower
    logic s21;  // leg b, upper
    logic s22;  // leg b, lower
  } hbridge_gates_t;

  localparam real PI = 3.14159265358979323846;

  // One entry of the quantised sine table (see the formula above).
  function automatic int unsigned sine_entry(int unsigned k, int unsigned n,
                                             int unsigned mid, int unsigned quant);
    real x;
    real steps;
    x     = 2.0 * PI * real'(k) / real'(n);
    steps = real'(mid) / real'(quant) * (1.0 + $sin(x));
    return quant * int'($floor(steps + 0.5));
  endfunction

endpackage
