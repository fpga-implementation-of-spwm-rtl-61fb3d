// tb_square_wave_gen: self-checking test of the symmetrical 180-degree control.
//
// Uses a 50-cycle half period and a 5-cycle dead time. A reference model
// predicts each leg command from the cycle count since reset (leg a up in the
// first half of each period) and the gates through a behavioural dead-time
// predictor; the gates are compared every cycle. It also checks the measured
// shape: no zero-voltage state (two levels only), positive and negative
// half-waves of HALF-DT cycles each and a period of 2*HALF cycles, and the
// bridge output never shorted.
module tb_square_wave_gen;
  import spwm_pkg::*;
  localparam int unsigned H  = 50;
  localparam int unsigned DT = 5;

  logic           clk = 1'b0;
  logic           rst;
  hbridge_gates_t gates;
  logic           ea_u, ea_l, eb_u, eb_l;
  int             vo;
  logic           defined, shoot;

  int unsigned checks = 0, failures = 0;

  square_wave_gen #(.HALF_CYCLES(H), .DEAD_CYCLES(DT)) dut (.clk, .rst, .gates);

  // model of the command: counter value after each edge
  int unsigned m_cnt;
  always @(posedge clk) begin
    if (rst) m_cnt <= 0;
    else     m_cnt <= (m_cnt + 1) % (2 * H);
  end

  dead_time_ref #(.DEAD_CYCLES(DT)) r_a (.clk, .rst, .cmd(m_cnt < H),    .exp_upper(ea_u), .exp_lower(ea_l));
  dead_time_ref #(.DEAD_CYCLES(DT)) r_b (.clk, .rst, .cmd(!(m_cnt < H)), .exp_upper(eb_u), .exp_lower(eb_l));
  hbridge_model bridge (.gates, .vo, .defined, .shoot_through(shoot));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int unsigned pos_run = 0, neg_run = 0, cyc = 0, last_rise = 0;
  int unsigned pos_waves = 0, neg_waves = 0;
  logic        prev_s11 = 1'b0;

  always @(negedge clk) begin
    cyc++;
    checks++;
    if (gates !== {ea_u, ea_l, eb_u, eb_l}) begin
      failures++;
      if (failures < 10) $display("cyc %0d gates %b exp %b", cyc, gates, {ea_u, ea_l, eb_u, eb_l});
    end
    checks++;
    if (shoot || (defined && vo == 0)) failures++;  // two-level output only
    if (!rst) begin
      if (defined && vo == 1) pos_run++;
      else if (pos_run != 0) begin
        checks++; pos_waves++;
        if (pos_run != H - DT) begin failures++; $display("positive wave %0d", pos_run); end
        pos_run = 0;
      end
      if (defined && vo == -1) neg_run++;
      else if (neg_run != 0) begin
        checks++; neg_waves++;
        if (neg_run != H - DT) begin failures++; $display("negative wave %0d", neg_run); end
        neg_run = 0;
      end
      if (gates.s11 && !prev_s11) begin
        if (last_rise != 0) begin
          checks++;
          if (cyc - last_rise != 2 * H) failures++;
        end
        last_rise = cyc;
      end
    end
    else begin
      pos_run = 0;
      neg_run = 0;
    end
    prev_s11 = gates.s11;
  end

  initial begin
    rst = 1'b1;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    repeat (10 * H + 7) @(negedge clk);
    rst = 1'b1;                 // reset in the middle of a period
    repeat (2) @(negedge clk);
    rst = 1'b0;
    pos_run = 0; neg_run = 0; last_rise = 0;
    repeat (8 * H) @(negedge clk);
    checks++;
    if (pos_waves < 8 || neg_waves < 8) failures++;
    $display("positive half-waves %0d, negative half-waves %0d", pos_waves, neg_waves);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
