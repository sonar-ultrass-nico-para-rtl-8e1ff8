// delay_line: first-in first-out shift register that delays a sample stream
// by DEPTH samples.
//
// DEPTH registers of W bits are chained; on every enable each register takes
// the value of the one before it and the first takes the input, so the
// output is the input as it was DEPTH enables earlier. This is the z^-K
// element of a moving-average comb: in the low-pass filter it holds the last
// 80 (first stage) or 53 (second stage) integrator values.
//
// A chain of plain D flip-flops running at the sample rate is how the
// receive channel builds its delays; the synchronous reset that clears the
// chain is this implementation's addition (it makes the filter start from a
// zero history).
//
// Interface: clk, rst (synchronous, active high), en (sample strobe), d;
// q = d delayed by DEPTH enables.
module delay_line #(
  parameter int unsigned DEPTH = 4,
  parameter int unsigned W     = sonar_pkg::LPF_W
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         en,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);

  logic [W-1:0] stage [DEPTH];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < int'(DEPTH); i++) stage[i] <= '0;
    end else if (en) begin
      stage[0] <= d;
      for (int i = 1; i < int'(DEPTH); i++) stage[i] <= stage[i-1];
    end
  end

  assign q = stage[DEPTH-1];

  initial assert (DEPTH >= 1) else $error("delay_line: DEPTH must be at least 1");

endmodule
