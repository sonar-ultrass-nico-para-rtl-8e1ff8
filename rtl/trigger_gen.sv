// trigger_gen: rate generator that keeps the whole receive channel in step.
//
// Three free-running counters run on the system clock (100 MHz). Each counts
// from 1 up to its division ratio and then starts again at 1; its strobe is
// high for the one clock cycle in which the counter holds the ratio. With the
// default ratios the strobes come at 50 MHz (sigma-delta sampling), 160 kHz
// (CIC output, oscillator, mixers, low-pass filter) and 8 kHz (final
// decimation). Because all counters leave reset together and 12500 = 20 * 625,
// every 8 kHz strobe falls in the same cycle as a 160 kHz strobe.
//
// The counting scheme and the three ratios are those of the receive-channel
// design. The synchronous reset, which returns every counter to 1, is this
// implementation's addition; the counters otherwise only start from power-up
// values.
//
// Interface: clk, rst (synchronous, active high); outputs stb_sdm, stb_bb,
// stb_out, each a one-cycle pulse. The first stb_sdm comes DIV_SDM-1 cycles
// after reset is released, the first stb_bb after DIV_BB-1 cycles.
module trigger_gen #(
  parameter int unsigned DIV_SDM = sonar_pkg::DIV_SDM,
  parameter int unsigned DIV_BB  = sonar_pkg::DIV_BB,
  parameter int unsigned DIV_OUT = sonar_pkg::DIV_OUT
) (
  input  logic clk,
  input  logic rst,
  output logic stb_sdm,
  output logic stb_bb,
  output logic stb_out
);

  localparam int unsigned W_SDM = $clog2(DIV_SDM + 1);
  localparam int unsigned W_BB  = $clog2(DIV_BB + 1);
  localparam int unsigned W_OUT = $clog2(DIV_OUT + 1);

  logic [W_SDM-1:0] cnt_sdm;
  logic [W_BB-1:0]  cnt_bb;
  logic [W_OUT-1:0] cnt_out;

  always_ff @(posedge clk) begin
    if (rst) begin
      cnt_sdm <= W_SDM'(1);
      cnt_bb  <= W_BB'(1);
      cnt_out <= W_OUT'(1);
    end else begin
      cnt_sdm <= stb_sdm ? W_SDM'(1) : cnt_sdm + W_SDM'(1);
      cnt_bb  <= stb_bb  ? W_BB'(1)  : cnt_bb  + W_BB'(1);
      cnt_out <= stb_out ? W_OUT'(1) : cnt_out + W_OUT'(1);
    end
  end

  always_comb begin
    stb_sdm = (cnt_sdm == W_SDM'(DIV_SDM));
    stb_bb  = (cnt_bb  == W_BB'(DIV_BB));
    stb_out = (cnt_out == W_OUT'(DIV_OUT));
  end

endmodule
