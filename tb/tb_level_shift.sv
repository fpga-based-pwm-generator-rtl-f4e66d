// tb_level_shift: self-checking test of the carrier level shifter.
//
// Applies random base carriers (w = K - m, as the two counters produce)
// and random strategy vectors, and checks every carrier against
// (strategy[i] ? w : m) + i*K with K = 2^14/8 = 2048. Also checks the two
// named arrangements: phase disposition (all M) and alternating MWMW.
module tb_level_shift;
  timeunit 1ns; timeprecision 1ps;

  localparam int unsigned W  = 16;
  localparam int unsigned NC = 8;
  localparam int unsigned K  = 2048;

  logic [W-1:0] m_base, w_base;
  logic [NC-1:0] strategy;
  logic [NC-1:0][W-1:0] carriers;

  int checks = 0, failures = 0;

  level_shift #(.CNT_W(W), .NUM_CARRIERS(NC), .K(K)) dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  task automatic apply(int unsigned m, logic [NC-1:0] s);
    m_base = W'(m);
    w_base = W'(K - m);
    strategy = s;
    #1;
    for (int unsigned i = 0; i < NC; i++) begin
      int unsigned base = s[i] ? K - m : m;
      check(carriers[i] == W'(base + i * K),
            $sformatf("m=%0d s=%b carrier %0d = %0d, expected %0d",
                      m, s, i, carriers[i], base + i * K));
    end
  endtask

  initial begin
    // Phase disposition at the carrier valley: 0, K, 2K, ... 7K.
    apply(0, pwm_pkg::STRATEGY_PD);
    check(int'(carriers[7]) == 7 * K, "PD top carrier at valley");
    // MWMW at the valley: even carriers at their bottom, odd at their top.
    apply(0, pwm_pkg::STRATEGY_MWMW);
    check(int'(carriers[0]) == 0 && int'(carriers[1]) == 2 * K && int'(carriers[2]) == 2 * K &&
          int'(carriers[7]) == 8 * K, "MWMW carriers at valley");
    apply(K, pwm_pkg::STRATEGY_MWMW);
    check(int'(carriers[0]) == K && int'(carriers[1]) == K, "MWMW carriers at peak");
    for (int k = 0; k < 2000; k++) apply($urandom_range(0, K), NC'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
