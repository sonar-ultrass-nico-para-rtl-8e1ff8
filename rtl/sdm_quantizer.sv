// sdm_quantizer: the sampling flip-flop of the first-order sigma-delta
// modulator.
//
// Outside the FPGA two RC integrators feed the positive and negative inputs
// of an LVDS differential input buffer, which acts as the modulator's
// subtractor and comparator; its output (cmp_in here) is not tied to any
// clock. This flip-flop takes that level at each sampling instant, which
// turns the comparator into a 1-bit quantizer running at the sampling rate.
// Its output is both the modulator's bitstream and, through an output buffer
// and the second RC integrator, the feedback to the negative input.
//
// The flip-flop with enable is the modulator's own; driving the enable from
// a one-cycle strobe of the system clock, rather than clocking the flip-flop
// from a divided clock, is this implementation's choice, as is the
// synchronous reset to 0.
//
// Interface: clk, rst (synchronous, active high), sample_en (one-cycle strobe
// at the sampling rate), cmp_in (comparator output); bit_out changes one
// clock after each sample_en.
module sdm_quantizer (
  input  logic clk,
  input  logic rst,
  input  logic sample_en,
  input  logic cmp_in,
  output logic bit_out
);

  always_ff @(posedge clk) begin
    if (rst)            bit_out <= 1'b0;
    else if (sample_en) bit_out <= cmp_in;
  end

endmodule
