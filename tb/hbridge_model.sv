// hbridge_model: behavioural model of the single-phase full-bridge power stage
// (not synthesizable logic; a testbench model of analog power hardware).
//
// Maps the four gate signals to the load voltage level v_o in units of V_in,
// following the switching-state table of a two-leg bridge: S11+S22 gives
// +V_in, S12+S21 gives -V_in, both upper or both lower switches give 0 (the
// freewheeling state). While a leg has neither switch on (dead time) its
// voltage is set by the load current through the diodes, which this model
// does not know: `defined` is then 0. `shoot_through` flags both switches of
// one leg on together, which would short the DC supply.
module hbridge_model
  import spwm_pkg::*;
(
  input  hbridge_gates_t gates,
  output int             vo,
  output logic           defined,
  output logic           shoot_through
);
  always_comb begin
    shoot_through = (gates.s11 && gates.s12) || (gates.s21 && gates.s22);
    defined       = (gates.s11 ^ gates.s12) && (gates.s21 ^ gates.s22);
    vo            = 0;
    if (defined) vo = int'(gates.s11) - int'(gates.s21);
  end
endmodule
