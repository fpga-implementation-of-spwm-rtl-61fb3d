// tb_spwm_inverter_top: end-to-end test of the inverter gate controller at its
// default sizes (100 MHz clock, 2,000,000-cycle square-wave period,
// 600 x 3334-cycle sine period, 5/10 kHz carrier, 400-cycle dead time).
//
// Sequence: reset; one whole fundamental period with the 5 kHz carrier; half
// a period with the 10 kHz carrier; a reset in mid-operation; a further stretch
// of operation. A reference model built from formulas predicts all twelve
// gate outputs every cycle (square-wave command from the cycle count;
// carrier STEP*min(n, 2*HALF-n); reference 2000 + 100*round(80*(1+sin(2*pi*k/600))),
// second reference 299 samples ahead; behavioural dead-time predictor).
// Three bridge models turn the gates into output levels. Each mechanism is
// counted and must occur: square-wave half-waves of each sign, bipolar and
// unipolar pulses, unipolar zero states, dead-time intervals on each leg,
// the carrier-frequency switch, the sine table wrapping and the reset. The
// square-wave and bipolar outputs must never be in the zero state, and no
// leg may ever be shorted.
module tb_spwm_inverter_top;
  import spwm_pkg::*;
  localparam int unsigned DT   = 400;
  localparam int unsigned SQH  = 1_000_000;
  localparam int unsigned FUND = 600 * 3334;

  logic           clk = 1'b0;
  logic           rst;
  logic           switch_fast;
  hbridge_gates_t sq_gates, bip_gates, uni_gates;

  int unsigned checks = 0, failures = 0;

  spwm_inverter_top dut (.clk, .rst, .switch_fast, .sq_gates, .bip_gates, .uni_gates);

  always #5 clk = ~clk;

  initial begin
    repeat (5_000_000) @(posedge clk);
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

  // ---- reference model: values the design's registers hold after each edge
  int unsigned k, n, nn, sq_cnt;
  logic        mf, nmf;
  int unsigned m_c, m_ra, m_rb;
  logic        m_a, m_b;
  int unsigned mode_changes = 0;

  always @(posedge clk) begin
    if (rst) begin
      k <= 0; n <= 0; mf <= switch_fast; sq_cnt <= 0;
      m_c <= 0; m_ra <= ref_level_at(0); m_rb <= ref_level_at(299);
      m_a <= 1'b0; m_b <= 1'b0;
    end else begin
      if (n == 2 * (mf ? 5000 : 10000) - 1) begin nn = 0; nmf = switch_fast; end
      else begin nn = n + 1; nmf = mf; end
      if (nmf != mf) mode_changes++;
      n      <= nn;
      mf     <= nmf;
      m_c    <= tri_at(nn, nmf);
      k      <= k + 1;
      sq_cnt <= (sq_cnt + 1) % (2 * SQH);
      m_ra   <= ref_level_at((k + 1) / 3334);
      m_rb   <= ref_level_at(299 + (k + 1) / 3334);
      m_a    <= (m_c < m_ra);
      m_b    <= (m_c < m_rb);
    end
  end

  hbridge_gates_t e_sq, e_bip, e_uni;
  dead_time_ref #(.DEAD_CYCLES(DT)) r_sq_a  (.clk, .rst, .cmd(sq_cnt < SQH),    .exp_upper(e_sq.s11),  .exp_lower(e_sq.s12));
  dead_time_ref #(.DEAD_CYCLES(DT)) r_sq_b  (.clk, .rst, .cmd(!(sq_cnt < SQH)), .exp_upper(e_sq.s21),  .exp_lower(e_sq.s22));
  dead_time_ref #(.DEAD_CYCLES(DT)) r_bip_a (.clk, .rst, .cmd(m_a),             .exp_upper(e_bip.s11), .exp_lower(e_bip.s12));
  dead_time_ref #(.DEAD_CYCLES(DT)) r_bip_b (.clk, .rst, .cmd(!m_a),            .exp_upper(e_bip.s21), .exp_lower(e_bip.s22));
  dead_time_ref #(.DEAD_CYCLES(DT)) r_uni_a (.clk, .rst, .cmd(m_a),             .exp_upper(e_uni.s11), .exp_lower(e_uni.s12));
  dead_time_ref #(.DEAD_CYCLES(DT)) r_uni_b (.clk, .rst, .cmd(m_b),             .exp_upper(e_uni.s21), .exp_lower(e_uni.s22));

  int   vo_sq, vo_bip, vo_uni;
  logic def_sq, def_bip, def_uni, sh_sq, sh_bip, sh_uni;
  hbridge_model b_sq  (.gates(sq_gates),  .vo(vo_sq),  .defined(def_sq),  .shoot_through(sh_sq));
  hbridge_model b_bip (.gates(bip_gates), .vo(vo_bip), .defined(def_bip), .shoot_through(sh_bip));
  hbridge_model b_uni (.gates(uni_gates), .vo(vo_uni), .defined(def_uni), .shoot_through(sh_uni));

  // ---- mechanism counters
  int unsigned sq_pos = 0, sq_neg = 0, bip_pulses = 0, bip_pulses_fast = 0;
  int unsigned uni_pulses = 0, uni_zero = 0, dead_intervals = 0, wraps = 0, resets = 0;
  logic        p_sq_pos = 0, p_sq_neg = 0, p_bip = 0, p_uni = 0, p_rst = 0;
  logic [3:0]  p_leg_off = '0;
  logic [3:0]  leg_off;
  int unsigned p_phase = 0, phase;

  always @(negedge clk) begin
    if (!rst) begin
      checks++;
      if (sq_gates !== e_sq || bip_gates !== e_bip || uni_gates !== e_uni) begin
        failures++;
        if (failures < 10)
          $display("k %0d sq %b/%b bip %b/%b uni %b/%b", k, sq_gates, e_sq,
                   bip_gates, e_bip, uni_gates, e_uni);
      end
      checks++;
      if (sh_sq || sh_bip || sh_uni || (def_sq && vo_sq == 0) || (def_bip && vo_bip == 0))
        failures++;
      if (def_sq && vo_sq == 1 && !p_sq_pos) sq_pos++;
      if (def_sq && vo_sq == -1 && !p_sq_neg) sq_neg++;
      if (bip_gates.s11 && !p_bip) begin
        bip_pulses++;
        if (mf) bip_pulses_fast++;
      end
      if (def_uni && vo_uni != 0 && !p_uni) uni_pulses++;
      if (def_uni && vo_uni == 0) uni_zero++;
      leg_off = {!(sq_gates.s11 || sq_gates.s12), !(bip_gates.s11 || bip_gates.s12),
                 !(uni_gates.s11 || uni_gates.s12), !(uni_gates.s21 || uni_gates.s22)};
      for (int i = 0; i < 4; i++) if (leg_off[i] && !p_leg_off[i]) dead_intervals++;
      p_leg_off = leg_off;
      phase = (k / 3334) % 600;
      if (phase < p_phase) wraps++;
      p_phase = phase;
    end else if (!p_rst) resets++;
    p_rst    = rst;
    p_sq_pos = def_sq && vo_sq == 1;
    p_sq_neg = def_sq && vo_sq == -1;
    p_bip    = bip_gates.s11;
    p_uni    = def_uni && vo_uni != 0;
  end

  task automatic require(input string what, input int unsigned count);
    checks++;
    $display("%-36s %0d", what, count);
    if (count == 0) begin
      failures++;
      $display("  never happened: %s", what);
    end
  endtask

  initial begin
    rst = 1'b1;
    switch_fast = 1'b0;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    repeat (FUND + 10) @(negedge clk);
    switch_fast = 1'b1;
    repeat (FUND / 2) @(negedge clk);
    rst = 1'b1;
    repeat (2) @(negedge clk);
    rst = 1'b0;
    p_phase = 0;
    repeat (300_000) @(negedge clk);
    require("square-wave positive half-waves", sq_pos);
    require("square-wave negative half-waves", sq_neg);
    require("bipolar pulses", bip_pulses);
    require("bipolar pulses with 10 kHz carrier", bip_pulses_fast);
    require("unipolar output pulses", uni_pulses);
    require("unipolar zero-state cycles", uni_zero);
    require("dead-time intervals", dead_intervals);
    require("carrier frequency switches", mode_changes);
    require("sine table wraps", wraps);
    require("resets", resets);
    // one square-wave period (2,000,000 cycles) fits in the first stretch: 2 positive
    // half-waves (start and restart after 2,000,000 cycles) before the reset
    checks++;
    if (sq_neg < 2) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
