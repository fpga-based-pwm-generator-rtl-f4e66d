// pwm_comparator: compares every phase reference with every carrier.
//
// For phase p and carrier i the switching signal is 1 while the reference
// lies above the carrier (ref[p] > carriers[i]). A reference inside the
// band of carrier i therefore gives a PWM signal on bit i, all bits below
// it stay high and all bits above it stay low; the number of high bits is
// the inverter level of that phase.
//
// Interface: refs are N_BITS-bit unsigned values, zero-extended to the
// carrier width; pwm[p][i] is registered, so it follows the inputs by one
// clock and cannot glitch while the comparators settle.
//
// The comparison of each reference with all carriers follows the published
// design; the strict greater-than and the output register are this
// design's own choices.
module pwm_comparator #(
  parameter int unsigned N_BITS       = pwm_pkg::N_BITS,
  parameter int unsigned CNT_W        = pwm_pkg::CNT_W,
  parameter int unsigned NUM_CARRIERS = pwm_pkg::LEVELS - 1,
  parameter int unsigned PHASES       = 3
) (
  input  logic                                   clk,
  input  logic                                   rst_n,
  input  logic [PHASES-1:0][N_BITS-1:0]          refs,
  input  logic [NUM_CARRIERS-1:0][CNT_W-1:0]     carriers,
  output logic [PHASES-1:0][NUM_CARRIERS-1:0]    pwm
);

  logic [PHASES-1:0][NUM_CARRIERS-1:0] pwm_d;

  always_comb begin
    for (int unsigned p = 0; p < PHASES; p++) begin
      for (int unsigned i = 0; i < NUM_CARRIERS; i++) begin
        pwm_d[p][i] = CNT_W'(refs[p]) > carriers[i];
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) pwm <= '0;
    else        pwm <= pwm_d;
  end

  initial assert (N_BITS <= CNT_W) else $error("N_BITS must not exceed CNT_W");

endmodule
