// dead_time_ref: behavioural prediction of one leg's gates for the testbenches.
//
// Given the leg command as the design's dead-time stage sees it at each
// rising clock edge, predicts the gates after that edge: a switch is on once
// the command has selected it at the edge where it last changed and at
// DEAD_CYCLES further edges. A reset edge counts as a change to the lower
// switch. Outputs update with nonblocking assignments on the rising edge;
// compare them at the falling edge.
module dead_time_ref #(
  parameter int unsigned DEAD_CYCLES = 400
) (
  input  logic clk,
  input  logic rst,
  input  logic cmd,
  output logic exp_upper,
  output logic exp_lower
);
  int unsigned run_len;
  logic        prev;

  always @(posedge clk) begin
    if (rst) begin
      run_len   = 1;
      prev      = 1'b0;
      exp_upper <= 1'b0;
      exp_lower <= 1'b0;
    end else begin
      if (cmd !== prev) run_len = 1;
      else run_len++;
      prev = cmd;
      exp_upper <= cmd  && (run_len > DEAD_CYCLES);
      exp_lower <= !cmd && (run_len > DEAD_CYCLES);
    end
  end
endmodule
