// tb_dead_time: self-checking test of the leg dead-time generator.
//
// Drives a random leg command with runs both longer and shorter than the dead
// time and predicts the gates from the command history: a switch is on in
// cycle n only if the command selected it continuously for the last
// DEAD_CYCLES+1 clock edges (a reset counts as a change to the lower switch). Also checks that
// the blanking interval lasts exactly DEAD_CYCLES cycles on each transition
// and that the two gates are never on together.
module tb_dead_time;
  localparam int unsigned DT = 12;

  logic clk = 1'b0;
  logic rst;
  logic cmd;
  logic upper, lower;

  int unsigned checks   = 0;
  int unsigned failures = 0;
  int unsigned run_len  = 0;  // samples for which cmd has been unchanged (incl. current)
  logic        cmd_prev;
  int unsigned gaps = 0, swallowed = 0;

  dead_time #(.DEAD_CYCLES(DT)) dut (.clk, .rst, .cmd, .upper, .lower);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic exp_u, input logic exp_l);
    checks++;
    if (upper !== exp_u || lower !== exp_l) begin
      failures++;
      if (failures < 10)
        $display("mismatch at %0t: cmd=%b run=%0d upper=%b lower=%b exp %b %b",
                 $time, cmd, run_len, upper, lower, exp_u, exp_l);
    end
    checks++;
    if (upper && lower) failures++;
  endtask

  // Reference model: update the history at each edge, compare just after it.
  logic exp_u, exp_l;
  always @(posedge clk) begin
    if (rst) begin
      // The reset edge acts like a change of the command to 0.
      run_len  = 1;
      cmd_prev = 1'b0;
      exp_u    = 1'b0;
      exp_l    = 1'b0;
    end else begin
      if (cmd !== cmd_prev) run_len = 1;
      else run_len++;
      cmd_prev = cmd;
      // A switch is on once the command selected it at the change edge and
      // at DT further edges.
      exp_u = (cmd  && run_len >= DT + 1) ? 1'b1 : 1'b0;
      exp_l = (!cmd && run_len >= DT + 1) ? 1'b1 : 1'b0;
    end
    #1 check(exp_u, exp_l);
  end

  int unsigned len;
  initial begin
    rst = 1'b1;
    cmd = 1'b0;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    for (int i = 0; i < 400; i++) begin
      // mix of long runs (full blanking visible) and short ones (swallowed)
      len = (i % 3 == 0) ? ($urandom_range(1, DT)) : ($urandom_range(DT + 1, 4 * DT));
      if (len <= DT) swallowed++; else gaps++;
      repeat (len) @(negedge clk);
      cmd = ~cmd;
      if (i == 200) begin
        rst = 1'b1;
        @(negedge clk);
        rst = 1'b0;
      end
    end
    repeat (3 * DT) @(negedge clk);
    checks++;
    if (gaps == 0 || swallowed == 0) failures++;
    $display("runs longer than dead time: %0d, shorter: %0d", gaps, swallowed);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
