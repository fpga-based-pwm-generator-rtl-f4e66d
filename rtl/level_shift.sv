// level_shift: builds the m-1 level-shifted carriers from the two bases.
//
// Carrier i (i = 0 is the lowest) is the M-based or the W-based base
// carrier, as strategy[i] selects (0 = M, 1 = W), raised by i*K, where
// K = 2^n/(m-1) is the offset factor. Carrier i therefore sweeps
// i*K .. (i+1)*K, and the m-1 carriers together tile 0 .. 2^n. With all
// strategy bits 0 this is phase disposition; alternating bits give the
// "MWMW" arrangement.
//
// Interface: purely combinational; carriers is valid in the same cycle as
// m_base, w_base and strategy. The i*K offsets are elaboration-time
// constants, so each carrier costs one multiplexer and one adder.
//
// The offset rule and the M/W choice per carrier follow the published
// design; making the choice one bit per carrier is this design's own way
// of encoding the PWM strategy input.
module level_shift #(
  parameter int unsigned CNT_W        = pwm_pkg::CNT_W,
  parameter int unsigned NUM_CARRIERS = pwm_pkg::LEVELS - 1,
  parameter int unsigned K            = pwm_pkg::K
) (
  input  logic [CNT_W-1:0]                   m_base,
  input  logic [CNT_W-1:0]                   w_base,
  input  logic [NUM_CARRIERS-1:0]            strategy,
  output logic [NUM_CARRIERS-1:0][CNT_W-1:0] carriers
);

  always_comb begin
    for (int unsigned i = 0; i < NUM_CARRIERS; i++) begin
      carriers[i] = (strategy[i] ? w_base : m_base) + CNT_W'(i * K);
    end
  end

  initial assert (NUM_CARRIERS * K < (1 << CNT_W))
    else $error("top carrier peak does not fit in CNT_W bits");

endmodule
