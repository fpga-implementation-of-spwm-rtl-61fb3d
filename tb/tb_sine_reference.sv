// tb_sine_reference: self-checking test of the sinusoidal reference.
//
// Instance u_fast uses a 3-cycle sample step (instead of 3334) and starts at
// index 299, so two whole table periods run quickly; its output is compared
// every cycle with 2000 + 100*round(80*(1+sin(2*pi*k/600))), computed here,
// and with the first entries of the original table (8000, 8100, 8200, 8300,
// 8300, 8400, 8500). Instance u_full runs at the defaults and is checked for
// the 3334-cycle step interval and the value sequence over its first steps.
module tb_sine_reference;
  import spwm_pkg::*;

  logic       clk = 1'b0;
  logic       rst;
  level_t     ref_f, ref_d;
  logic [9:0] idx_f, idx_d;
  logic       wrap_f, wrap_d;

  int unsigned checks = 0, failures = 0;

  sine_reference #(.SAMPLE_CYCLES(3), .START_INDEX(299)) u_fast (
    .clk, .rst, .ref_level(ref_f), .index(idx_f), .wrap(wrap_f));
  sine_reference u_full (
    .clk, .rst, .ref_level(ref_d), .index(idx_d), .wrap(wrap_d));

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int unsigned expect_level(int unsigned k);
    real s;
    s = 80.0 * (1.0 + $sin(2.0 * 3.141592653589793 * real'(k) / 600.0));
    return 2000 + 100 * int'($floor(s + 0.5));
  endfunction

  // first printed entries of the original table
  int unsigned printed [7] = '{8000, 8100, 8200, 8300, 8300, 8400, 8500};

  int unsigned cyc = 0;  // edges since reset release
  int unsigned k_f, k_d;
  int unsigned wraps = 0, steps_d = 0, last_step_d = 0;
  logic [9:0]  prev_idx_d;

  always @(posedge clk) begin
    if (rst) cyc = 0; else cyc++;
    #1;
    // fast instance: index = (299 + cyc/3) mod 600
    k_f = (299 + cyc / 3) % 600;
    checks++;
    if (idx_f !== 10'(k_f) || ref_f !== LEVEL_W'(expect_level(k_f))) begin
      failures++;
      if (failures < 10) $display("fast: cyc %0d idx %0d exp %0d ref %0d exp %0d",
                                  cyc, idx_f, k_f, ref_f, expect_level(k_f));
    end
    if (k_f < 7) begin
      checks++;
      if (ref_f !== LEVEL_W'(printed[k_f] + 2000)) failures++;
    end
    if (!rst && wrap_f) begin
      wraps++;
      checks++;
      // wrap fires in the last cycle of index 599
      if (idx_f !== 10'd599 || (cyc % 3) != 2) failures++;
    end
    // full-size instance
    k_d = cyc / 3334;
    checks++;
    if (idx_d !== 10'(k_d % 600) || ref_d !== LEVEL_W'(expect_level(k_d % 600))) failures++;
    if (!rst && idx_d != prev_idx_d) begin
      steps_d++;
      checks++;
      if (cyc - last_step_d != 3334) begin
        failures++;
        $display("step interval %0d", cyc - last_step_d);
      end
      last_step_d = cyc;
    end
    prev_idx_d = idx_d;
  end

  initial begin
    rst = 1'b1;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    repeat (2 * 600 * 3 + 10) @(negedge clk);
    wait (steps_d >= 20);
    @(negedge clk);
    checks++;
    if (wraps < 2) failures++;
    $display("table wraps %0d, full-size steps %0d", wraps, steps_d);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
