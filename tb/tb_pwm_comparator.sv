// tb_pwm_comparator: self-checking test of the reference/carrier comparators.
//
// Drives random references and carriers and checks, one clock later, that
// every output bit equals (reference > carrier). Includes equality and
// boundary cases, the reset value, and the three references of the
// published test (3072, 5120, 7168) against carriers stacked at i*2048.
module tb_pwm_comparator;
  timeunit 1ns; timeprecision 1ps;

  localparam int unsigned N  = 14;
  localparam int unsigned W  = 16;
  localparam int unsigned NC = 8;
  localparam int unsigned P  = 3;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [P-1:0][N-1:0] refs;
  logic [NC-1:0][W-1:0] carriers;
  logic [P-1:0][NC-1:0] pwm;

  int checks = 0, failures = 0;

  pwm_comparator #(.N_BITS(N), .CNT_W(W), .NUM_CARRIERS(NC), .PHASES(P)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  task automatic apply_and_check();
    logic [P-1:0][NC-1:0] exp;
    for (int p = 0; p < P; p++)
      for (int i = 0; i < NC; i++)
        exp[p][i] = (int'(refs[p]) > int'(carriers[i]));
    @(posedge clk); #1;
    check(pwm == exp, $sformatf("pwm=%h expected %h", pwm, exp));
  endtask

  initial begin
    refs = '{default: '1};
    carriers = '0;
    @(posedge clk); #1;
    check(pwm == '0, "reset value");
    rst_n = 1'b1;
    // Published test values with the carriers at their valleys.
    refs[0] = 14'd3072; refs[1] = 14'd5120; refs[2] = 14'd7168;
    for (int i = 0; i < NC; i++) carriers[i] = W'(i * 2048);
    apply_and_check();
    check(pwm[0] == 8'b0000_0011 && pwm[1] == 8'b0000_0111 && pwm[2] == 8'b0000_1111,
          "published values at carrier valley");
    for (int i = 0; i < NC; i++) carriers[i] = W'(i * 2048 + 2048);
    apply_and_check();
    check(pwm[0] == 8'b0000_0001 && pwm[1] == 8'b0000_0011 && pwm[2] == 8'b0000_0111,
          "published values at carrier peak");
    // Equality gives 0.
    for (int i = 0; i < NC; i++) carriers[i] = W'(3072);
    apply_and_check();
    check(pwm[0] == '0, "equal reference and carrier");
    for (int k = 0; k < 3000; k++) begin
      for (int p = 0; p < P; p++) refs[p] = N'($urandom);
      for (int i = 0; i < NC; i++)
        carriers[i] = (k % 4 == 0) ? W'(int'(refs[$urandom_range(0, P-1)]) + $urandom_range(0, 2) - 1)
                                   : W'($urandom_range(0, 16384));
      apply_and_check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
