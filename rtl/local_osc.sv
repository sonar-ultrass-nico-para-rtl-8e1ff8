// local_osc: 40 kHz local oscillator for the downconverter.
//
// Sampled at four times the carrier (160 kHz), a sine of the carrier
// frequency only ever takes the values at its maxima, minima and zero
// crossings. The oscillator therefore needs no table: a 2-bit phase counter
// advances on each baseband strobe and selects +1.0, 0, -1.0, 0 (Q2.14) for
// phases 0, 1, 2, 3, which is cos(pi/2 * n).
//
// The sequence, its rate and the counter-driven selection are the receive
// channel's. Starting at phase 0 after the synchronous reset is this
// implementation's choice.
//
// Interface: clk, rst (synchronous, active high), en (160 kHz strobe);
// lo (Q2.14), which moves to the next phase one clock after en.
module local_osc
  import sonar_pkg::*;
(
  input  logic   clk,
  input  logic   rst,
  input  logic   en,
  output q2_14_t lo
);

  logic [1:0] phase;

  always_ff @(posedge clk) begin
    if (rst)     phase <= 2'd0;
    else if (en) phase <= phase + 2'd1;
  end

  always_comb begin
    unique case (phase)
      2'd0:    lo = Q_ONE;
      2'd2:    lo = Q_MINUS1;
      default: lo = Q_ZERO;
    endcase
  end

endmodule
