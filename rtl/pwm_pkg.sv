// pwm_pkg: constants and types shared by the multilevel PWM generator.
//
// The generator drives an m-level inverter from n-bit phase references.
// The reference build is a nine-level inverter (m = 9) fed with 14-bit
// references (n = 14), so m-1 = 8 carriers are needed and each carrier
// spans the offset factor K = 2^n / (m-1) = 2048 counts. The carriers are
// held in a 16-bit counter width, and the DSP word is 16 bits wide with a
// 2-bit phase address on top of the 14-bit value. All of these numbers
// follow the published design. The carrier step of 2 counts per clock is
// this design's own choice: with a 10.24 MHz clock it makes one carrier
// period (0 -> K -> 0) last 2048 clocks, which is exactly 200 us (5 kHz).
package pwm_pkg;

  // Reference data resolution n (bits) and number of inverter levels m.
  parameter int unsigned N_BITS       = 14;
  parameter int unsigned LEVELS       = 9;
  // Width of the carrier counter and of every level-shifted carrier.
  parameter int unsigned CNT_W        = 16;
  // Counts added or removed per clock by the carrier counter.
  parameter int unsigned CARRIER_STEP = 2;
  // Input synchroniser depth for the asynchronous DSP bus.
  parameter int unsigned SYNC_STAGES  = 2;

  // Offset factor K = 2^n / (m-1) (integer division when m-1 is not a
  // power of two).
  function automatic int unsigned k_offset(int unsigned n, int unsigned m);
    return (32'd1 << n) / (m - 1);
  endfunction

  parameter int unsigned K = k_offset(N_BITS, LEVELS);

  // Phase address carried in the top two bits of the bus word.
  typedef enum logic [1:0] {
    ADDR_VSA  = 2'b00,
    ADDR_VSB  = 2'b01,
    ADDR_VSC  = 2'b10,
    ADDR_NONE = 2'b11    // no phase: the word is ignored
  } phase_addr_e;

  // Carrier strategy: bit i selects the base carrier of level-shifted
  // carrier i (i = 0 is the lowest). 0 = M-based (starts at 0 and rises),
  // 1 = W-based (starts at K and falls, i.e. in phase opposition).
  // Phase disposition, all carriers M-based ("MMMM").
  parameter logic [LEVELS-2:0] STRATEGY_PD   = '0;
  // Alternating M and W from the lowest carrier up ("MWMW").
  parameter logic [LEVELS-2:0] STRATEGY_MWMW = {((LEVELS-1)/2){2'b10}};

endpackage
