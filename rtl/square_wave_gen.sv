// square_wave_gen: symmetrical (180 degree, full-wave) control of the bridge.
//
// A counter runs through 2*HALF_CYCLES clocks. During the first half the leg
// command is "leg a up, leg b down", so S11 and S22 conduct and the load sees
// +V_in; during the second half S12 and S21 conduct and it sees -V_in. With
// the default 1,000,000-cycle half period and the 100 MHz clock the output is
// a 50 Hz square wave, as in the original controller. Each leg passes through
// a dead_time block (4 us = 400 cycles by default), which replaces the fixed
// threshold offsets the original used for blanking.
//
// Interface: clk, synchronous active-high rst, four gate outputs.
// Timing: the counter restarts from 0 at reset; the leg commands change at
// counts 0 and HALF_CYCLES, and the gates follow after the dead_time delay
// (old switch off one clock later, new switch on DEAD_CYCLES clocks later).
// Which half comes first is this design's choice.
module square_wave_gen
  import spwm_pkg::*;
#(
  parameter int unsigned HALF_CYCLES = 1_000_000,
  parameter int unsigned DEAD_CYCLES = 400
) (
  input  logic           clk,
  input  logic           rst,
  output hbridge_gates_t gates
);

  localparam int unsigned CW = $clog2(2 * HALF_CYCLES);

  logic [CW-1:0] cnt;
  logic          first_half;

  always_ff @(posedge clk) begin
    if (rst)                                cnt <= '0;
    else if (cnt == CW'(2 * HALF_CYCLES - 1)) cnt <= '0;
    else                                    cnt <= cnt + 1'b1;
  end

  assign first_half = (cnt < CW'(HALF_CYCLES));

  dead_time #(.DEAD_CYCLES(DEAD_CYCLES)) u_leg_a (
    .clk, .rst, .cmd(first_half),  .upper(gates.s11), .lower(gates.s12)
  );
  dead_time #(.DEAD_CYCLES(DEAD_CYCLES)) u_leg_b (
    .clk, .rst, .cmd(!first_half), .upper(gates.s21), .lower(gates.s22)
  );

endmodule
