// tb_bipolar_spwm: self-checking test of the bipolar sine-triangle modulator.
//
// Runs at the default sizes: one whole 2,000,400-cycle fundamental period with
// the 5 kHz carrier, then half a period with the 10 kHz carrier. A reference
// model, written from formulas rather than from the design's registers,
// predicts carrier = STEP*min(n, 2*HALF-n), the reference
// 2000 + 100*round(80*(1+sin(2*pi*k/600))) with k = cycles/3334, the
// registered comparison carrier < reference and, through a behavioural
// dead-time predictor, all four gates; everything is compared every cycle.
// Measured behaviour: about 100 pulses per fundamental at 5 kHz and per half
// fundamental at 10 kHz, a two-level output that never takes the zero
// state, an average output of about 0.8*V_in near the positive peak of the
// reference (m_a = 0.8) and -0.8*V_in near the negative peak, and no leg
// ever shorted.
module tb_bipolar_spwm;
  import spwm_pkg::*;
  localparam int unsigned DT = 400;
  localparam int unsigned FUND = 600 * 3334;

  logic           clk = 1'b0;
  logic           rst;
  logic           switch_fast;
  hbridge_gates_t gates;
  level_t         carrier, ref_a;
  logic           ea_u, ea_l, eb_u, eb_l;
  int             vo;
  logic           defined, shoot;

  int unsigned checks = 0, failures = 0;

  bipolar_spwm dut (.clk, .rst, .switch_fast, .gates, .carrier, .ref_a);

  always #5 clk = ~clk;

  initial begin
    repeat (4_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int unsigned ref_level_at(int unsigned k);
    real s;
    s = 80.0 * (1.0 + $sin(2.0 * 3.141592653589793 * real'(k % 600) / 600.0));
    return 2000 + 100 * int'($floor(s + 0.5));
  endfunction

  function automatic int unsigned tri_at(int unsigned n, logic fast);
    int unsigned h, st;
    h  = fast ? 5000 : 10000;
    st = fast ? 4 : 2;
    return st * ((n < 2 * h - n) ? n : 2 * h - n);
  endfunction

  // reference model (nonblocking: mirrors what registers hold after each edge)
  int unsigned k, n, nn;
  logic        mf, nmf;
  int unsigned m_c, m_r;
  logic        m_la;

  always @(posedge clk) begin
    if (rst) begin
      k <= 0; n <= 0; mf <= switch_fast;
      m_c <= 0; m_r <= ref_level_at(0); m_la <= 1'b0;
    end else begin
      if (n == 2 * (mf ? 5000 : 10000) - 1) begin nn = 0; nmf = switch_fast; end
      else begin nn = n + 1; nmf = mf; end
      n    <= nn;
      mf   <= nmf;
      m_c  <= tri_at(nn, nmf);
      k    <= k + 1;
      m_r  <= ref_level_at((k + 1) / 3334);
      m_la <= (m_c < m_r);
    end
  end

  dead_time_ref #(.DEAD_CYCLES(DT)) r_a (.clk, .rst, .cmd(m_la),  .exp_upper(ea_u), .exp_lower(ea_l));
  dead_time_ref #(.DEAD_CYCLES(DT)) r_b (.clk, .rst, .cmd(!m_la), .exp_upper(eb_u), .exp_lower(eb_l));
  hbridge_model bridge (.gates, .vo, .defined, .shoot_through(shoot));

  int unsigned pulses = 0, zero_states = 0, pos_cyc = 0, neg_cyc = 0;
  int          peak_sum = 0, trough_sum = 0;
  int unsigned peak_n = 0, trough_n = 0, phase;
  logic        prev_s11 = 1'b0;

  always @(negedge clk) begin
    if (!rst) begin
      checks++;
      if (gates !== {ea_u, ea_l, eb_u, eb_l} || carrier !== LEVEL_W'(m_c) || ref_a !== LEVEL_W'(m_r)) begin
        failures++;
        if (failures < 10)
          $display("k %0d gates %b exp %b carrier %0d exp %0d ref %0d exp %0d",
                   k, gates, {ea_u, ea_l, eb_u, eb_l}, carrier, m_c, ref_a, m_r);
      end
      checks++;
      if (shoot || (defined && vo == 0)) failures++;
      if (gates.s11 && !prev_s11) pulses++;
      if (defined && vo == 1)  pos_cyc++;
      if (defined && vo == -1) neg_cyc++;
      // average output around the peaks of the reference (samples 120..180 and 420..480)
      phase = (k / 3334) % 600;
      if (defined && phase >= 120 && phase < 180) begin peak_sum += vo;   peak_n++;   end
      if (defined && phase >= 420 && phase < 480) begin trough_sum += vo; trough_n++; end
    end
    prev_s11 = gates.s11;
  end

  real avg_peak, avg_trough;
  int unsigned pulses_slow;
  initial begin
    rst = 1'b1;
    switch_fast = 1'b0;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    repeat (FUND) @(negedge clk);
    pulses_slow = pulses;
    avg_peak    = real'(peak_sum) / real'(peak_n);
    avg_trough  = real'(trough_sum) / real'(trough_n);
    switch_fast = 1'b1;
    repeat (FUND / 2) @(negedge clk);
    $display("pulses: %0d per fundamental at 5 kHz, %0d per half fundamental at 10 kHz",
             pulses_slow, pulses - pulses_slow);
    $display("average v_o/V_in near peak %f, near trough %f", avg_peak, avg_trough);
    checks++;
    if (pulses_slow < 99 || pulses_slow > 101) failures++;
    checks++;
    if (pulses - pulses_slow < 98 || pulses - pulses_slow > 102) failures++;
    checks++;
    if (avg_peak < 0.7 || avg_peak > 0.9 || avg_trough > -0.7 || avg_trough < -0.9) failures++;
    checks++;
    if (pos_cyc == 0 || neg_cyc == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
