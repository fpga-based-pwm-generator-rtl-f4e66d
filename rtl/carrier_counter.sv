// carrier_counter: 16-bit up-down counter that forms a triangular carrier.
//
// The count runs between 0 and PEAK (the offset factor K) in steps of STEP,
// turning at both ends, so one carrier period takes 2*PEAK/STEP clocks.
// With START_DOWN = 0 the counter leaves reset at 0 counting up: this is
// the M-based carrier. With START_DOWN = 1 it leaves reset at PEAK
// counting down: the W-based carrier. Two instances reset together run in
// exact phase opposition (their sum is always PEAK).
//
// Interface: count is registered; counting_up is the present direction;
// period_start pulses for one clock each time the count is back at its
// starting end (0 for M, PEAK for W), i.e. once per carrier period.
// If PEAK is not a multiple of STEP the count is clamped at PEAK.
//
// The up-down counting mode, the 16-bit width and the two base carriers
// follow the published design; the step size, the reset state and the
// period_start output are this design's own choices.
module carrier_counter #(
  parameter int unsigned CNT_W      = pwm_pkg::CNT_W,
  parameter int unsigned PEAK       = pwm_pkg::K,
  parameter int unsigned STEP       = pwm_pkg::CARRIER_STEP,
  parameter bit          START_DOWN = 1'b0
) (
  input  logic             clk,
  input  logic             rst_n,
  output logic [CNT_W-1:0] count,
  output logic             counting_up,
  output logic             period_start
);

  localparam logic [CNT_W-1:0] PEAK_V = CNT_W'(PEAK);
  localparam logic [CNT_W-1:0] STEP_V = CNT_W'(STEP);

  logic [CNT_W-1:0] count_d;
  logic             up_d;

  always_comb begin
    count_d = count;
    up_d    = counting_up;
    if (counting_up) begin
      if (count >= PEAK_V - STEP_V) begin
        count_d = PEAK_V;
        up_d    = 1'b0;
      end else begin
        count_d = count + STEP_V;
      end
    end else begin
      if (count <= STEP_V) begin
        count_d = '0;
        up_d    = 1'b1;
      end else begin
        count_d = count - STEP_V;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      count        <= START_DOWN ? PEAK_V : '0;
      counting_up  <= !START_DOWN;
      period_start <= 1'b0;
    end else begin
      count        <= count_d;
      counting_up  <= up_d;
      period_start <= START_DOWN ? (count_d == PEAK_V && count != PEAK_V)
                                 : (count_d == '0 && count != '0);
    end
  end

  initial begin
    assert (STEP >= 1 && STEP <= PEAK) else $error("STEP must lie in 1..PEAK");
    assert (PEAK < (1 << CNT_W)) else $error("PEAK does not fit in CNT_W bits");
  end

endmodule
