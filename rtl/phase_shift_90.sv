// phase_shift_90: the 90 degree shift that turns the local oscillator into
// its quadrature copy.
//
// With four samples per carrier period, delaying the oscillator by one
// sample period shifts it by a quarter period, i.e. 90 degrees: the
// sequence 1, 0, -1, 0 (cos) becomes 0, 1, 0, -1 (sin). The shift is thus a
// single 16-bit register loaded on each baseband strobe.
//
// The one-sample delay register is the receive channel's own realisation of
// the 90 degree block; the synchronous reset to zero is this
// implementation's addition.
//
// Interface: clk, rst (synchronous, active high), en (160 kHz strobe),
// d (Q2.14); q holds the value d had at the previous en.
module phase_shift_90
  import sonar_pkg::*;
(
  input  logic   clk,
  input  logic   rst,
  input  logic   en,
  input  q2_14_t d,
  output q2_14_t q
);

  always_ff @(posedge clk) begin
    if (rst)     q <= '0;
    else if (en) q <= d;
  end

endmodule
