// ref_input: receives the phase references written by the DSP.
//
// The DSP presents a 16-bit word on general purpose I/O pins: bits 15-14
// address a phase (00 Vsa, 01 Vsb, 10 Vsc) and bits 13-0 carry that
// phase's reference value. This module passes the word through a
// SYNC_STAGES-deep flip-flop synchroniser (the DSP is not clocked by the
// FPGA clock), decodes the address and loads the value into the addressed
// phase register. Address 11 writes nothing.
//
// Interface: bus_in is sampled on every rising clk edge; there is no write
// strobe, so the DSP should hold each word for at least two clocks and
// change the address last (or park the bus at address 11 between words).
// Timing: a word on bus_in reaches ref_a/b/c SYNC_STAGES+1 clocks later;
// wr pulses (bit 0 a, 1 b, 2 c) in the cycle the register is loaded.
// Reset (asynchronous, active low) clears the references to 0.
//
// The word format follows the published design; the synchroniser, the
// missing strobe, the meaning of address 11 and the reset value are this
// design's own choices.
module ref_input #(
  parameter int unsigned N_BITS      = pwm_pkg::N_BITS,
  parameter int unsigned SYNC_STAGES = pwm_pkg::SYNC_STAGES,
  localparam int unsigned BUS_W      = N_BITS + 2
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [BUS_W-1:0]  bus_in,
  output logic [N_BITS-1:0] ref_a,
  output logic [N_BITS-1:0] ref_b,
  output logic [N_BITS-1:0] ref_c,
  output logic [2:0]        wr
);

  logic [BUS_W-1:0] sync_q [SYNC_STAGES];
  logic [BUS_W-1:0] word;
  pwm_pkg::phase_addr_e addr;
  logic [N_BITS-1:0] value;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < SYNC_STAGES; i++) sync_q[i] <= {2'b11, {N_BITS{1'b0}}};
    end else begin
      sync_q[0] <= bus_in;
      for (int i = 1; i < SYNC_STAGES; i++) sync_q[i] <= sync_q[i-1];
    end
  end

  assign word  = sync_q[SYNC_STAGES-1];
  assign addr  = pwm_pkg::phase_addr_e'(word[BUS_W-1 -: 2]);
  assign value = word[N_BITS-1:0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ref_a <= '0;
      ref_b <= '0;
      ref_c <= '0;
      wr    <= '0;
    end else begin
      wr <= '0;
      unique case (addr)
        pwm_pkg::ADDR_VSA: begin ref_a <= value; wr[0] <= 1'b1; end
        pwm_pkg::ADDR_VSB: begin ref_b <= value; wr[1] <= 1'b1; end
        pwm_pkg::ADDR_VSC: begin ref_c <= value; wr[2] <= 1'b1; end
        default:  ;
      endcase
    end
  end

  initial assert (SYNC_STAGES >= 1) else $error("SYNC_STAGES must be at least 1");

endmodule
