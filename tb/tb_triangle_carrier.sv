// tb_triangle_carrier: self-checking test of the triangular carrier.
//
// Runs the carrier at its default settings and toggles the carrier-select
// input at random points inside periods. A reference model counts the cycle n
// within the period and predicts carrier = STEP*min(n, 2*HALF-n), the
// period_start pulse and the setting in use, which may change only at a
// period boundary. It also measures the period between period_start pulses:
// 20000 cycles (5 kHz at 100 MHz) or 10000 cycles (10 kHz), and the peak
// value 20000 for both settings.
module tb_triangle_carrier;
  import spwm_pkg::*;

  logic   clk = 1'b0;
  logic   rst;
  logic   switch_fast;
  level_t carrier;
  logic   period_start, fast_active;

  int unsigned checks = 0, failures = 0;

  triangle_carrier dut (.clk, .rst, .switch_fast, .carrier, .period_start, .fast_active);

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference model
  int unsigned n;            // cycle within the period after this edge
  logic        m_fast;       // setting in use
  int unsigned half, step, exp_c;
  int unsigned last_start;   // cycle number of the previous period_start
  int unsigned cyc = 0;
  int unsigned periods_slow = 0, periods_fast = 0, peaks_slow = 0, peaks_fast = 0;

  always @(posedge clk) begin
    cyc++;
    if (rst) begin
      n      = 0;
      m_fast = switch_fast;
    end else begin
      half = m_fast ? 5000 : 10000;
      if (n == 2 * half - 1) begin
        n      = 0;
        m_fast = switch_fast;
      end else begin
        n++;
      end
    end
    half  = m_fast ? 5000 : 10000;
    step  = m_fast ? 4 : 2;
    exp_c = step * ((n < 2 * half - n) ? n : 2 * half - n);
    #1;
    checks++;
    if (carrier !== LEVEL_W'(exp_c) || period_start !== (n == 0) || fast_active !== m_fast) begin
      failures++;
      if (failures < 10)
        $display("mismatch cyc %0d: carrier %0d exp %0d start %b fast %b exp %b",
                 cyc, carrier, exp_c, period_start, fast_active, m_fast);
    end
    if (!rst && carrier == 20000) begin
      if (m_fast) peaks_fast++; else peaks_slow++;
    end
    if (!rst && period_start) begin
      if (last_start != 0) begin
        // length of the period that just ended, set by the setting it used
        checks++;
        if (!((cyc - last_start == 20000) || (cyc - last_start == 10000))) begin
          failures++;
          $display("bad period %0d", cyc - last_start);
        end
        if (cyc - last_start == 20000) periods_slow++; else periods_fast++;
      end
      last_start = cyc;
    end
  end

  initial begin
    last_start  = 0;
    rst         = 1'b1;
    switch_fast = 1'b0;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    for (int i = 0; i < 12; i++) begin
      repeat ($urandom_range(3000, 30000)) @(negedge clk);
      switch_fast = ~switch_fast;
    end
    repeat (40000) @(negedge clk);
    checks++;
    if (periods_slow == 0 || periods_fast == 0 || peaks_slow == 0 || peaks_fast == 0) failures++;
    $display("5 kHz periods %0d, 10 kHz periods %0d, peaks %0d/%0d",
             periods_slow, periods_fast, peaks_slow, peaks_fast);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
