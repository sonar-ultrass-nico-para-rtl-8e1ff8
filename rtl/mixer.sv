// mixer: multiplies the filtered input by the local oscillator.
//
// Both operands are Q2.14, so their full product is Q4.28 in 32 bits. Since
// the oscillator only ever holds +1, 0 or -1, the product never leaves the
// Q2.14 range of the signal operand, and the mixer keeps product bits 29 down
// to 14, dropping the two top and the fourteen bottom bits. The product is
// registered on each baseband strobe.
//
// The format handling and the registered product follow the receive
// channel; the synchronous reset is this implementation's addition. An
// oscillator value of exactly +-1.0 makes the output an exact copy (or exact
// negation) of the input.
//
// Interface: clk, rst (synchronous, active high), en (160 kHz strobe), a
// (signal, Q2.14), b (oscillator, Q2.14); p (Q2.14) one clock after en.
module mixer
  import sonar_pkg::*;
(
  input  logic   clk,
  input  logic   rst,
  input  logic   en,
  input  q2_14_t a,
  input  q2_14_t b,
  output q2_14_t p
);

  logic signed [2*SAMPLE_W-1:0] prod;

  always_ff @(posedge clk) begin
    if (rst)     prod <= '0;
    else if (en) prod <= a * b;
  end

  assign p = prod[SAMPLE_W+FRAC_W-1:FRAC_W];

endmodule
