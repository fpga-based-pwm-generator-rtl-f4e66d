// tb_carrier_counter: self-checking test of the triangular carrier counter.
//
// Runs an M-based (rising from 0) and a W-based (falling from PEAK)
// instance side by side at the default sizes (PEAK = 2048, step 2) and
// compares them every clock with the closed-form triangle
//   m(t) = STEP*t folded at PEAK, w(t) = PEAK - m(t),
// checks the direction outputs, checks that period_start pulses once per
// period of 2*PEAK/STEP = 2048 clocks (200 us at 10.24 MHz), and runs a
// small instance whose PEAK is not a multiple of STEP to check the clamp.
module tb_carrier_counter;
  timeunit 1ns; timeprecision 1ps;

  localparam int unsigned W    = 16;
  localparam int unsigned PEAK = 2048;
  localparam int unsigned STEP = 2;
  localparam int unsigned PERIOD = 2 * PEAK / STEP;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [W-1:0] m_cnt, w_cnt, s_cnt;
  logic m_up, w_up, s_up, m_ps, w_ps, s_ps;

  int checks = 0, failures = 0;

  carrier_counter #(.CNT_W(W), .PEAK(PEAK), .STEP(STEP), .START_DOWN(1'b0))
    u_m (.clk, .rst_n, .count(m_cnt), .counting_up(m_up), .period_start(m_ps));
  carrier_counter #(.CNT_W(W), .PEAK(PEAK), .STEP(STEP), .START_DOWN(1'b1))
    u_w (.clk, .rst_n, .count(w_cnt), .counting_up(w_up), .period_start(w_ps));
  // PEAK 10, step 3: 0 3 6 9 10 7 4 1 0 ...
  carrier_counter #(.CNT_W(W), .PEAK(10), .STEP(3), .START_DOWN(1'b0))
    u_s (.clk, .rst_n, .count(s_cnt), .counting_up(s_up), .period_start(s_ps));

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  function automatic int unsigned tri_m(int unsigned t);
    int unsigned ph = (t % PERIOD) * STEP;
    return (ph <= PEAK) ? ph : 2 * PEAK - ph;
  endfunction

  localparam int unsigned SMALL_SEQ [8] = '{0, 3, 6, 9, 10, 7, 4, 1};

  int unsigned m_pulses = 0, w_pulses = 0, last_m_pulse = 0;

  initial begin
    repeat (2) @(posedge clk);
    #1;
    check(int'(m_cnt) == 0 && m_up, "M reset state");
    check(int'(w_cnt) == PEAK && !w_up, "W reset state");
    rst_n = 1'b1;
    for (int unsigned t = 1; t <= 5 * PERIOD + 7; t++) begin
      @(posedge clk); #1;
      check(int'(m_cnt) == tri_m(t), $sformatf("t=%0d M=%0d expected %0d", t, m_cnt, tri_m(t)));
      check(int'(w_cnt) == PEAK - tri_m(t), $sformatf("t=%0d W=%0d expected %0d", t, w_cnt, PEAK - tri_m(t)));
      check(m_up == (tri_m(t + 1) > tri_m(t)), $sformatf("t=%0d M direction", t));
      check(w_up != m_up, $sformatf("t=%0d W direction", t));
      check(int'(s_cnt) == SMALL_SEQ[t % 8], $sformatf("t=%0d small=%0d", t, s_cnt));
      check(m_ps == (t % PERIOD == 0), $sformatf("t=%0d M period_start=%b", t, m_ps));
      check(w_ps == (t % PERIOD == 0), $sformatf("t=%0d W period_start=%b", t, w_ps));
      check(s_ps == (t % 8 == 0), $sformatf("t=%0d small period_start", t));
      if (m_ps) begin
        if (m_pulses > 0)
          check(t - last_m_pulse == PERIOD, $sformatf("period %0d clocks", t - last_m_pulse));
        m_pulses++;
        last_m_pulse = t;
      end
      if (w_ps) w_pulses++;
    end
    check(m_pulses == 5 && w_pulses == 5, $sformatf("%0d/%0d period pulses", m_pulses, w_pulses));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20 * PERIOD) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
