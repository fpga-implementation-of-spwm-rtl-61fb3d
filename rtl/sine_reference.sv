// sine_reference: table-driven sinusoidal reference v* for the modulators.
//
// A sample timer counts SAMPLE_CYCLES clocks; at its end the table index
// advances by one and wraps from SAMPLES-1 to 0. The reference is
// BIAS + table[index], where table[k] = QUANT*round(MID/QUANT*(1+sin(2*pi*k/SAMPLES)))
// is computed at elaboration (see spwm_pkg). With the defaults the reference
// spans 2000..18000 around the middle of a 0..20000 carrier, i.e. a modulation
// index of 0.8, and one sine period lasts 600*3334 = 2,000,400 cycles
// (49.99 Hz at 100 MHz). The 600 samples, the 3334-cycle step, the +2000 bias
// and the quantisation to 100 follow the original controller; computing the
// table from the formula instead of storing constants is this design's choice.
//
// START_INDEX sets the phase: the unipolar modulator uses a second instance
// that starts half a table ahead to obtain the opposite reference.
//
// Timing: `ref_level` and `index` are registered and change together one
// clock after the sample timer expires. `wrap` is high for the one cycle in
// which the timer expires while the index is SAMPLES-1. Reset (synchronous)
// loads START_INDEX and its table value and clears the timer.
module sine_reference
  import spwm_pkg::*;
#(
  parameter int unsigned SAMPLES       = 600,
  parameter int unsigned SAMPLE_CYCLES = 3334,
  parameter int unsigned START_INDEX   = 0,
  parameter int unsigned MID           = 8000,
  parameter int unsigned QUANT         = 100,
  parameter int unsigned BIAS          = 2000
) (
  input  logic                       clk,
  input  logic                       rst,
  output level_t                     ref_level,
  output logic [$clog2(SAMPLES)-1:0] index,
  output logic                       wrap
);

  localparam int unsigned IW = $clog2(SAMPLES);
  localparam int unsigned TW = $clog2(SAMPLE_CYCLES);

  typedef level_t table_t [SAMPLES];

  function automatic table_t build_table();
    table_t t;
    for (int unsigned k = 0; k < SAMPLES; k++)
      t[k] = LEVEL_W'(BIAS + sine_entry(k, SAMPLES, MID, QUANT));
    return t;
  endfunction

  // Read-only table, BIAS already added.
  localparam table_t TABLE = build_table();

  logic [TW-1:0] timer;
  logic          step;
  logic [IW-1:0] next_index;

  always_comb begin
    step       = (timer == TW'(SAMPLE_CYCLES - 1));
    next_index = (index == IW'(SAMPLES - 1)) ? '0 : index + 1'b1;
    wrap       = step && (index == IW'(SAMPLES - 1));
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      timer     <= '0;
      index     <= IW'(START_INDEX);
      ref_level <= TABLE[START_INDEX];
    end else if (step) begin
      timer     <= '0;
      index     <= next_index;
      ref_level <= TABLE[next_index];
    end else begin
      timer <= timer + 1'b1;
    end
  end

endmodule
