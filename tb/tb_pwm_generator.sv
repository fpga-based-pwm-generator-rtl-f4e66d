// tb_pwm_generator: end-to-end test of the three-phase multilevel PWM
// generator at its default sizes (nine levels, 14-bit references,
// K = 2048, carrier period 2048 clocks, 10.24 MHz clock => 200 us).
//
// The testbench plays the DSP: after each carrier_sync pulse it writes the
// three phase references over the 16-bit bus (address 00/01/10 over the
// value), then parks the bus on the idle address 11. New references are
// written every second carrier period; in between, a full window of 2048
// clocks is measured and, for every phase and carrier, the number of
// clocks the PWM bit is high is compared with the count worked out from
// the reference alone:
//   x = ref - i*K;  high = 0 if x <= 0, 2048 if x > K, else 2*ceil(x/2)-1
// (the base carrier visits 0,2,...,2048,...,2 once per period; the count
// is the same for M- and W-based carriers). Every clock it also checks
// that each phase's eight bits form a thermometer code.
//
// Phases of the test:
//  1. after reset, all outputs low (references are 0);
//  2. fixed references Vsa=3072, Vsb=5120, Vsc=7168 with phase
//     disposition: PwmA[1], PwmB[2], PwmC[3] run at about 50% duty, the
//     bits below stay high and the bits above stay low;
//  3. the same with the MWMW strategy; right after the carrier valley the
//     odd (W-based) carriers are at their top, so PwmA[1] must be low where
//     under phase disposition it is high;
//  4. one full 16 ms period of three sine references 120 degrees apart,
//     full scale, MWMW, sampled every 400 us: every phase level 0..8
//     (number of high bits) must occur.
// Mechanisms counted (a failure if one never happens): writes to each
// phase, ignored idle-address words, strategy switches, 50% duty windows,
// every phase level.
module tb_pwm_generator;
  timeunit 1ns; timeprecision 1ps;

  localparam int unsigned N      = 14;
  localparam int unsigned NC     = 8;
  localparam int unsigned K      = 2048;
  localparam int unsigned PERIOD = 2048;
  localparam real         PI     = 3.14159265358979;

  logic          clk = 1'b0;
  logic          rst_n = 1'b0;
  logic [N+1:0]  bus_in = {2'b11, 14'd0};
  logic [NC-1:0] strategy = '0;
  logic [NC-1:0] pwm_a, pwm_b, pwm_c;
  logic          carrier_sync;

  pwm_generator dut (.*);

  // 10.24 MHz
  always #48.828 clk = ~clk;

  int checks = 0, failures = 0;
  int n_write[3] = '{0, 0, 0};
  int n_idle = 0, n_switch = 0, n_half = 0;
  int level_seen[3][NC+1];

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 30) $display("FAIL: %s", what); end
  endtask

  function automatic int unsigned exp_high(int unsigned r, int unsigned i);
    int x = int'(r) - int'(i * K);
    if (x <= 0) return 0;
    if (x > int'(K)) return PERIOD;
    return 2 * ((x + 1) / 2) - 1;
  endfunction

  function automatic bit is_thermo(logic [NC-1:0] v);
    return ((v + 1'b1) & v) == '0;
  endfunction

  function automatic int unsigned popc(logic [NC-1:0] v);
    int unsigned c = 0;
    for (int i = 0; i < NC; i++) c += v[i];
    return c;
  endfunction

  // Thermometer code and level coverage, every clock after reset.
  always @(posedge clk) if (rst_n) begin
    #1;
    check(is_thermo(pwm_a) && is_thermo(pwm_b) && is_thermo(pwm_c),
          $sformatf("not a thermometer code: %b %b %b", pwm_a, pwm_b, pwm_c));
    level_seen[0][popc(pwm_a)]++;
    level_seen[1][popc(pwm_b)]++;
    level_seen[2][popc(pwm_c)]++;
  end

  task automatic put(logic [1:0] addr, logic [N-1:0] val);
    @(negedge clk);
    bus_in = {addr, val};
    repeat (2) @(negedge clk);
    if (addr == 2'b11) n_idle++;
    else n_write[addr]++;
  endtask

  // Write three references right after a carrier valley.
  task automatic write_refs(int unsigned ra, int unsigned rb, int unsigned rc);
    @(posedge carrier_sync);
    put(2'b00, N'(ra));
    put(2'b01, N'(rb));
    put(2'b10, N'(rc));
    // The idle address carries a value that must not be stored anywhere.
    put(2'b11, N'($urandom));
  endtask

  // Measure 2048 consecutive clocks and compare the high counts.
  task automatic measure(int unsigned ra, int unsigned rb, int unsigned rc);
    int unsigned hi[3][NC];
    int unsigned r[3];
    r = '{ra, rb, rc};
    foreach (hi[p, i]) hi[p][i] = 0;
    repeat (PERIOD) begin
      @(posedge clk); #2;
      for (int i = 0; i < NC; i++) begin
        hi[0][i] += pwm_a[i];
        hi[1][i] += pwm_b[i];
        hi[2][i] += pwm_c[i];
      end
    end
    for (int p = 0; p < 3; p++)
      for (int i = 0; i < NC; i++) begin
        check(hi[p][i] == exp_high(r[p], i),
              $sformatf("phase %0d carrier %0d ref %0d: high %0d clocks, expected %0d",
                        p, i, r[p], hi[p][i], exp_high(r[p], i)));
        if (hi[p][i] > PERIOD / 2 - 8 && hi[p][i] < PERIOD / 2 + 8) n_half++;
      end
  endtask

  // One update period and one measured period.
  task automatic step(int unsigned ra, int unsigned rb, int unsigned rc);
    write_refs(ra, rb, rc);
    repeat (20) @(posedge clk);
    measure(ra, rb, rc);
  endtask

  int unsigned sa, sb, sc;
  logic pd_bit;
  real  th;

  initial begin
    foreach (level_seen[p, l]) level_seen[p][l] = 0;
    repeat (4) @(posedge clk);
    rst_n = 1'b1;
    // 1. References are 0 after reset: no switching at all.
    repeat (PERIOD) begin
      @(posedge clk); #2;
      check(pwm_a == 0 && pwm_b == 0 && pwm_c == 0, "outputs not low after reset");
    end

    // 2. Published fixed references, phase disposition.
    step(3072, 5120, 7168);
    check(pwm_a[0] && !(|pwm_a[NC-1:2]) && (&pwm_b[1:0]) && !(|pwm_b[NC-1:3]) &&
          (&pwm_c[2:0]) && !(|pwm_c[NC-1:4]), "published case: fixed bits");
    @(posedge carrier_sync); repeat (8) @(posedge clk); #2;
    pd_bit = pwm_a[1];
    check(pd_bit == 1'b1, "PD: PwmA[1] low just after the valley");

    // 3. Same references, MWMW.
    @(negedge clk);
    strategy = pwm_pkg::STRATEGY_MWMW;
    n_switch++;
    step(3072, 5120, 7168);
    @(posedge carrier_sync); repeat (8) @(posedge clk); #2;
    check(pwm_a[1] == 1'b0, "MWMW: PwmA[1] high just after the valley");
    check(pwm_b[2] == 1'b1, "MWMW: PwmB[2] low just after the valley");

    // Random references, both strategies.
    for (int k = 0; k < 6; k++) begin
      @(negedge clk);
      strategy = (k % 2 != 0) ? pwm_pkg::STRATEGY_PD : NC'($urandom);
      n_switch++;
      step($urandom_range(0, 16383), $urandom_range(0, 16383), $urandom_range(0, 16383));
    end
    step(0, 16383, 8192);

    // 4. One 16 ms sine period, MWMW, new samples every 400 us.
    @(negedge clk);
    strategy = pwm_pkg::STRATEGY_MWMW;
    n_switch++;
    foreach (level_seen[p, l]) level_seen[p][l] = 0;
    for (int s = 0; s < 40; s++) begin
      th = 2.0 * PI * s / 40.0;
      sa = $rtoi(8192.0 + 8191.0 * $sin(th));
      sb = $rtoi(8192.0 + 8191.0 * $sin(th - 2.0 * PI / 3.0));
      sc = $rtoi(8192.0 + 8191.0 * $sin(th + 2.0 * PI / 3.0));
      step(sa, sb, sc);
    end
    for (int p = 0; p < 3; p++)
      for (int l = 0; l <= NC; l++)
        check(level_seen[p][l] > 0, $sformatf("phase %0d never at level %0d", p, l));

    $display("mechanisms: writes a/b/c %0d/%0d/%0d, idle words %0d, strategy switches %0d, 50%% windows %0d",
             n_write[0], n_write[1], n_write[2], n_idle, n_switch, n_half);
    check(n_write[0] > 0 && n_write[1] > 0 && n_write[2] > 0, "a phase was never written");
    check(n_idle > 0, "idle address never used");
    check(n_switch > 0, "strategy never switched");
    check(n_half > 0, "no 50% duty window");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (120 * PERIOD) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
