// clk_divider: frequency divider that sets the sampling instants of the
// stand-alone sigma-delta ADC.
//
// A counter runs from 0 to N-1 on the input clock. The output is low while
// the counter is below N/2 (integer division) and high for the rest of the
// count, so an even N gives exactly 50% duty cycle and an odd N is low for
// floor(N/2) input periods and high for one period more. The output is a
// register, so it is free of glitches.
//
// Division by N with a square-wave output is the modulator's; the
// odd-N split is read from the divider's own counting scheme. A rising edge
// of clk_out is also reported as a one-cycle strobe (rise), so the sampling
// flip-flop can stay on the system clock instead of being clocked by the
// divided signal; that strobe and the synchronous reset are this
// implementation's choices.
//
// Interface: clk_in, rst (synchronous, active high); clk_out (divided
// square wave), rise (high for the clk_in cycle in which clk_out has just
// gone high). Period N input cycles.
module clk_divider #(
  parameter int unsigned N = 2
) (
  input  logic clk_in,
  input  logic rst,
  output logic clk_out,
  output logic rise
);

  localparam int unsigned CW = (N > 2) ? $clog2(N) : 1;

  logic [CW-1:0] cnt;
  logic          out_d;

  always_comb begin
    out_d = (cnt >= CW'(N / 2));
  end

  always_ff @(posedge clk_in) begin
    if (rst) begin
      cnt     <= '0;
      clk_out <= 1'b0;
      rise    <= 1'b0;
    end else begin
      cnt     <= (cnt == CW'(N - 1)) ? '0 : cnt + CW'(1);
      clk_out <= out_d;
      rise    <= out_d & ~clk_out;
    end
  end

  initial assert (N >= 2) else $error("clk_divider: N must be at least 2");

endmodule
