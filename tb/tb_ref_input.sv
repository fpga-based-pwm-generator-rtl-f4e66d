// tb_ref_input: self-checking test of the DSP word receiver.
//
// Drives 16-bit words (2-bit phase address over a 14-bit value) and checks
// that each lands in the addressed phase register only, that address 11
// changes nothing, that the wr pulse names the written phase, and that the
// value appears exactly SYNC_STAGES+1 clocks after the word is applied.
// Also checks the reset value (all references 0).
module tb_ref_input;
  timeunit 1ns; timeprecision 1ps;

  localparam int unsigned N  = 14;
  localparam int unsigned SS = 2;

  logic          clk = 1'b0;
  logic          rst_n = 1'b0;
  logic [N+1:0]  bus_in = '1;
  logic [N-1:0]  ref_a, ref_b, ref_c;
  logic [2:0]    wr;

  int checks = 0, failures = 0;

  ref_input #(.N_BITS(N), .SYNC_STAGES(SS)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic [N-1:0] exp_a = '0, exp_b = '0, exp_c = '0;

  // Apply one word, then count clocks until the write pulse appears.
  task automatic send(logic [1:0] addr, logic [N-1:0] val);
    int lat;
    @(negedge clk);
    bus_in = {addr, val};
    lat = 0;
    for (int i = 0; i < SS + 4; i++) begin
      @(posedge clk); #1;
      lat++;
      if (wr != 3'b000) break;
    end
    case (addr)
      2'b00: exp_a = val;
      2'b01: exp_b = val;
      2'b10: exp_c = val;
      default: ;
    endcase
    if (addr != 2'b11) begin
      check(lat == SS + 1, $sformatf("latency %0d, expected %0d", lat, SS + 1));
      check(wr == (3'b001 << addr), $sformatf("wr=%b for address %b", wr, addr));
    end else begin
      check(wr == 3'b000, "write pulse for address 11");
    end
    check(ref_a == exp_a && ref_b == exp_b && ref_c == exp_c,
          $sformatf("refs %0d %0d %0d, expected %0d %0d %0d",
                    ref_a, ref_b, ref_c, exp_a, exp_b, exp_c));
    // Park the bus on the idle address before the next word.
    @(negedge clk);
    bus_in = {2'b11, val};
    repeat (SS + 2) @(posedge clk);
    #1 check(wr == 3'b000, "write pulse while idle");
  endtask

  initial begin
    repeat (3) @(posedge clk);
    #1 check(ref_a == 0 && ref_b == 0 && ref_c == 0, "reset value");
    rst_n = 1'b1;
    // The three words used in the published test (phase a, b, c).
    send(2'b00, 14'd3072);
    send(2'b01, 14'd5120);
    send(2'b10, 14'd7168);
    send(2'b11, 14'd1234);
    for (int k = 0; k < 200; k++) begin
      send(2'($urandom_range(0, 3)), N'($urandom));
    end
    send(2'b00, '1);
    send(2'b10, '0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
