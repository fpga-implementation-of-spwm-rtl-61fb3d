// tb_output_thd: output-voltage distortion of bipolar and unipolar SPWM.
//
// Runs the full controller at its default sizes for one whole fundamental
// period (2,000,400 cycles) with the 5 kHz carrier, after a short settling
// interval. Bridge models turn the bipolar and unipolar gates into the load
// voltage in units of V_in; a cycle in which a leg is blanked by the dead time
// counts as 0 V. Over the period the testbench accumulates the mean square of
// v_o and its Fourier component at the fundamental, and reports
//   THD = sqrt(Vrms^2 - V1rms^2) / V1rms.
// For ideal sine-triangle PWM with m_a = 0.8 and m_f = 100 the expected
// values are about 146 % for bipolar switching (Vrms = 1, V1 = 0.8/sqrt(2))
// and about 77 % for unipolar switching. The checks: each THD within a band
// around those values, unipolar below bipolar, and a fundamental amplitude of
// about 0.8 for both.
module tb_output_thd;
  import spwm_pkg::*;
  localparam int unsigned FUND = 600 * 3334;
  localparam real         TWO_PI = 6.283185307179586;

  logic           clk = 1'b0;
  logic           rst;
  hbridge_gates_t sq_gates, bip_gates, uni_gates;
  int             vo_bip, vo_uni;
  logic           def_bip, def_uni, sh_bip, sh_uni;

  int unsigned checks = 0, failures = 0;

  spwm_inverter_top dut (.clk, .rst, .switch_fast(1'b0), .sq_gates, .bip_gates, .uni_gates);
  hbridge_model b_bip (.gates(bip_gates), .vo(vo_bip), .defined(def_bip), .shoot_through(sh_bip));
  hbridge_model b_uni (.gates(uni_gates), .vo(vo_uni), .defined(def_uni), .shoot_through(sh_uni));

  always #5 clk = ~clk;

  initial begin
    repeat (5_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Fundamental analysis over one reference period. The reference index
  // changes once every 3334 cycles, one cycle after its timer expires; the
  // analysis window starts with index 0 of the second period.
  real sq_b = 0, sq_u = 0, cb = 0, sb = 0, cu = 0, su = 0;
  real vb, vu, ph;

  function automatic real thd(real msq, real c, real s, int unsigned n);
    real v1sq;  // squared rms of the fundamental
    v1sq = 2.0 * ((c / n) * (c / n) + (s / n) * (s / n));
    return $sqrt(msq / n - v1sq) / $sqrt(v1sq);
  endfunction

  real thd_b, thd_u, amp_b, amp_u;
  initial begin
    rst = 1'b1;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    // skip the first period (start-up) and align with the next index-0 sample
    repeat (FUND) @(negedge clk);
    for (int unsigned i = 0; i < FUND; i++) begin
      @(negedge clk);
      vb = def_bip ? real'(vo_bip) : 0.0;
      vu = def_uni ? real'(vo_uni) : 0.0;
      ph = TWO_PI * real'(i) / real'(FUND);
      sq_b += vb * vb;  cb += vb * $cos(ph);  sb += vb * $sin(ph);
      sq_u += vu * vu;  cu += vu * $cos(ph);  su += vu * $sin(ph);
      checks++;
      if (sh_bip || sh_uni) failures++;
    end
    thd_b = thd(sq_b, cb, sb, FUND);
    thd_u = thd(sq_u, cu, su, FUND);
    amp_b = 2.0 * $sqrt((cb / FUND) * (cb / FUND) + (sb / FUND) * (sb / FUND));
    amp_u = 2.0 * $sqrt((cu / FUND) * (cu / FUND) + (su / FUND) * (su / FUND));
    $display("bipolar : fundamental %f V_in, THD %f %%", amp_b, 100.0 * thd_b);
    $display("unipolar: fundamental %f V_in, THD %f %%", amp_u, 100.0 * thd_u);
    checks++;
    if (thd_b < 1.30 || thd_b > 1.65) failures++;
    checks++;
    if (thd_u < 0.65 || thd_u > 0.95) failures++;
    checks++;
    if (thd_u >= thd_b) failures++;
    checks++;
    if (amp_b < 0.74 || amp_b > 0.86 || amp_u < 0.74 || amp_u > 0.86) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
