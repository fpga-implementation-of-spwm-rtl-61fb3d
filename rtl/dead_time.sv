// dead_time: complementary gate pair with blanking time for one bridge leg.
//
// The leg command `cmd` says which switch of the leg should conduct (1 = upper,
// 0 = lower). The switch that is being turned off drops at once; the switch
// that is being turned on waits until the command has been stable for
// DEAD_CYCLES clocks. In between both switches are off, so the two devices of
// a leg can never conduct together even though IGBTs turn off more slowly than
// they turn on. The document sets 4 us per leg; at 100 MHz that is 400 cycles.
// How the delay is produced (a counter restarted on every command change) is
// this design's own choice.
//
// Timing: outputs are registered. If `cmd` changes before clock edge t, the
// old switch is off after edge t and the new one turns on after edge
// t + DEAD_CYCLES. A command pulse shorter than DEAD_CYCLES keeps both switches
// off. Reset (synchronous, active high) turns both off and restarts the
// blanking interval, so the first switch also waits DEAD_CYCLES after reset.
module dead_time #(
  parameter int unsigned DEAD_CYCLES = 400
) (
  input  logic clk,
  input  logic rst,
  input  logic cmd,
  output logic upper,
  output logic lower
);

  localparam int unsigned CW = $clog2(DEAD_CYCLES + 1);

  logic          cmd_q;   // command seen at the previous edge
  logic [CW-1:0] stable;  // cycles the command has been unchanged, saturating

  always_ff @(posedge clk) begin
    if (rst) begin
      cmd_q  <= 1'b0;
      stable <= '0;
      upper  <= 1'b0;
      lower  <= 1'b0;
    end else begin
      cmd_q <= cmd;
      if (cmd != cmd_q) begin
        stable <= '0;
        upper  <= 1'b0;
        lower  <= 1'b0;
      end else begin
        if (stable < CW'(DEAD_CYCLES)) stable <= stable + 1'b1;
        // stable + 1 == DEAD_CYCLES at this edge: blanking is over
        if (stable >= CW'(DEAD_CYCLES - 1)) begin
          upper <= cmd;
          lower <= ~cmd;
        end
      end
    end
  end

  // The two switches of a leg are never on together.
  a_no_shoot_through: assert property (@(posedge clk) !(upper && lower));

endmodule
