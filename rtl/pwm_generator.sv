// pwm_generator: three-phase carrier-based PWM generator for an m-level
// inverter (top level).
//
// A DSP writes the three phase references over a 16-bit bus (2-bit phase
// address, 14-bit value); ref_input stores them. Two carrier_counter
// instances produce the triangular base carriers between 0 and K: the
// M-based one rising from 0 and the W-based one falling from K, in phase
// opposition. level_shift stacks m-1 = 8 copies of them, copy i raised by
// i*K and taken from M or W as strategy[i] says, so the carriers tile the
// whole reference range 0..2^14. pwm_comparator compares each reference
// with all eight carriers and drives eight switching signals per phase.
//
// Interface: clk (10.24 MHz gives a 200 us, 5 kHz carrier period with the
// default 2048-count carrier and step 2), rst_n (asynchronous, active
// low), bus_in (sampled every clock, no strobe), strategy (one bit per
// carrier, 0 = M-based, 1 = W-based; pwm_pkg::STRATEGY_PD and
// STRATEGY_MWMW are the two arrangements), pwm_a/pwm_b/pwm_c (bit i is the
// switching signal of carrier i; the number of high bits is the phase
// level 0..m-1). carrier_sync pulses once per carrier period, when the
// M-based carrier is at 0, for a DSP that wants to write its references
// in step with the carrier.
// Timing: a reference word reaches the PWM outputs SYNC_STAGES+2 clocks
// after it appears on bus_in.
//
// The structure, the bus format, K = 2^n/(m-1) and the sizes follow the
// published design; the synchroniser, the output register, the strategy
// encoding, the carrier step and carrier_sync are this design's own.
// The concurrent assertions at the end use rst_n as a synchronous disable
// while the flip-flops use it as an asynchronous reset; lint tools may
// report that double use, and it is harmless.
module pwm_generator #(
  parameter int unsigned N_BITS       = pwm_pkg::N_BITS,
  parameter int unsigned LEVELS       = pwm_pkg::LEVELS,
  parameter int unsigned CNT_W        = pwm_pkg::CNT_W,
  parameter int unsigned CARRIER_STEP = pwm_pkg::CARRIER_STEP,
  parameter int unsigned SYNC_STAGES  = pwm_pkg::SYNC_STAGES,
  localparam int unsigned NC          = LEVELS - 1,
  localparam int unsigned K           = pwm_pkg::k_offset(N_BITS, LEVELS)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [N_BITS+1:0] bus_in,
  input  logic [NC-1:0]     strategy,
  output logic [NC-1:0]     pwm_a,
  output logic [NC-1:0]     pwm_b,
  output logic [NC-1:0]     pwm_c,
  output logic              carrier_sync
);

  logic [2:0][N_BITS-1:0]     refs;
  logic [2:0]                 wr;
  logic [CNT_W-1:0]           m_base, w_base;
  logic                       m_up, w_up, w_sync;
  logic [NC-1:0][CNT_W-1:0]   carriers;
  logic [2:0][NC-1:0]         pwm;

  ref_input #(
    .N_BITS      (N_BITS),
    .SYNC_STAGES (SYNC_STAGES)
  ) u_ref_input (
    .clk    (clk),
    .rst_n  (rst_n),
    .bus_in (bus_in),
    .ref_a  (refs[0]),
    .ref_b  (refs[1]),
    .ref_c  (refs[2]),
    .wr     (wr)
  );

  carrier_counter #(
    .CNT_W      (CNT_W),
    .PEAK       (K),
    .STEP       (CARRIER_STEP),
    .START_DOWN (1'b0)
  ) u_m_carrier (
    .clk          (clk),
    .rst_n        (rst_n),
    .count        (m_base),
    .counting_up  (m_up),
    .period_start (carrier_sync)
  );

  carrier_counter #(
    .CNT_W      (CNT_W),
    .PEAK       (K),
    .STEP       (CARRIER_STEP),
    .START_DOWN (1'b1)
  ) u_w_carrier (
    .clk          (clk),
    .rst_n        (rst_n),
    .count        (w_base),
    .counting_up  (w_up),
    .period_start (w_sync)
  );

  level_shift #(
    .CNT_W        (CNT_W),
    .NUM_CARRIERS (NC),
    .K            (K)
  ) u_level_shift (
    .m_base   (m_base),
    .w_base   (w_base),
    .strategy (strategy),
    .carriers (carriers)
  );

  pwm_comparator #(
    .N_BITS       (N_BITS),
    .CNT_W        (CNT_W),
    .NUM_CARRIERS (NC),
    .PHASES       (3)
  ) u_comparator (
    .clk      (clk),
    .rst_n    (rst_n),
    .refs     (refs),
    .carriers (carriers),
    .pwm      (pwm)
  );

  assign pwm_a = pwm[0];
  assign pwm_b = pwm[1];
  assign pwm_c = pwm[2];

  // The two base carriers are locked in phase opposition.
  a_antiphase: assert property (@(posedge clk) disable iff (!rst_n)
                                (m_base + w_base == CNT_W'(K)) && (m_up != w_up));

  // wr and w_sync are observed by the assertions only.
  a_one_write: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(wr));
  a_w_turn:    assert property (@(posedge clk) disable iff (!rst_n)
                                w_sync |-> (w_base == CNT_W'(K)));

endmodule
