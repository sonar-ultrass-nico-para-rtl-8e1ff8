// cic_decimator: one-stage CIC (recursive moving-average) filter that turns
// the 1-bit sigma-delta stream into Q2.14 samples at the baseband rate.
//
// The modulator produces bits at 50 MHz, but the wanted 160 kHz output is
// not an integer fraction of 50 MHz (ratio 312.5). The filter therefore reads
// the bitstream on every 100 MHz system clock, so each modulator bit is
// counted twice, and averages over M = 625 clocks. Each bit becomes +1.0 or
// -1.0 in Q12.14 and is added to an integrator every clock. At each output
// strobe the comb subtracts the integrator value held at the previous strobe
// (a one-sample delay at the decimated rate) and divides the difference by M,
// giving the mean of the last M bits as a Q2.14 value between -1 and +1. The
// integrator is allowed to wrap: the difference is still exact as long as the
// window sum fits in ACC_W bits, which holds for M * 2^14 < 2^(ACC_W-1).
//
// Structure, M, the Q12.14 and Q2.14 formats and the division by M after
// the comb are the receive channel's. The division truncates towards zero,
// as the fixed-point division the design relies on does. The synchronous
// reset and the out_valid strobe are this implementation's additions.
//
// Interface: clk, rst (synchronous, active high), bit_in (sampled every
// clock), out_en (strobe every M clocks); y (Q2.14) and out_valid (one-cycle
// pulse) one clock after out_en. y is the mean of the bits seen in the M
// clocks before out_en, out_en's own cycle excluded.
module cic_decimator
  import sonar_pkg::*;
#(
  parameter int unsigned M     = sonar_pkg::DIV_BB,
  parameter int unsigned ACC_W = sonar_pkg::CIC_W
) (
  input  logic   clk,
  input  logic   rst,
  input  logic   bit_in,
  input  logic   out_en,
  output q2_14_t y,
  output logic   out_valid
);

  typedef logic signed [ACC_W-1:0] word_t;

  localparam word_t PLUS_ONE  = word_t'(1) <<< FRAC_W;
  localparam word_t MINUS_ONE = -PLUS_ONE;
  localparam word_t DIVISOR   = word_t'(M);

  word_t integ;      // running sum of +-1.0 per clock
  word_t integ_prev; // integrator value at the previous out_en
  word_t comb;
  word_t quotient;

  always_comb begin
    comb     = integ - integ_prev;
    quotient = comb / DIVISOR;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      integ      <= '0;
      integ_prev <= '0;
      y          <= '0;
      out_valid  <= 1'b0;
    end else begin
      integ     <= integ + (bit_in ? PLUS_ONE : MINUS_ONE);
      out_valid <= out_en;
      if (out_en) begin
        integ_prev <= integ;
        y          <= q2_14_t'(quotient);
      end
    end
  end

  initial assert (longint'(M) << FRAC_W < (longint'(1) << (ACC_W - 1)))
    else $error("cic_decimator: window sum does not fit in ACC_W bits");

endmodule
