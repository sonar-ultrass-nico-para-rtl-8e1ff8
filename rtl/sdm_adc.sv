// sdm_adc: digital side of the stand-alone first-order sigma-delta ADC, as
// built to measure the converter on its own.
//
// The modulator needs only two RC integrators outside the FPGA. The input
// signal, integrated by the first one, drives the positive input of an LVDS
// differential input buffer; the modulator's own output, integrated by the
// second one, drives the negative input. The buffer therefore subtracts and
// compares, and its output (cmp_in) is sampled here by a flip-flop at the
// rising edges of a clock divided down from the system clock (N = 2 gives
// 50 MHz from 100 MHz). The sampled bit is the converter output and also
// leaves through an output buffer (bit_out) to close the loop. A 36-bit shift
// register packs the bitstream into words, with a trigger every 36 samples,
// for recording.
//
// The structure, the division factor and the capture word length are those
// of the converter's measurement build. The input and output buffers are
// device primitives and the integrators are analog, so they stay outside
// this module: cmp_in is the input buffer's output and bit_out goes to the
// output buffer. Sampling on a one-cycle strobe rather than on the divided
// clock itself is this implementation's choice, so the divided clock
// (div_clk) is kept only for reference and nothing reads it.
//
// Interface: clk (100 MHz), rst (synchronous, active high), cmp_in; bit_out,
// cap_word (36 bits), cap_trig. bit_out changes two clock cycles after the
// divided clock's rising edge is registered (one for the edge strobe, one for
// the sampling flip-flop).
module sdm_adc #(
  parameter int unsigned DIV_N = sonar_pkg::DIV_SDM,
  parameter int unsigned CAP_N = 36
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             cmp_in,
  output logic             bit_out,
  output logic [CAP_N-1:0] cap_word,
  output logic             cap_trig
);

  logic div_clk;
  logic sample_en;
  logic sample_en_d;

  clk_divider #(.N(DIV_N)) u_div (
    .clk_in (clk),
    .rst    (rst),
    .clk_out(div_clk),
    .rise   (sample_en)
  );

  sdm_quantizer u_quant (
    .clk      (clk),
    .rst      (rst),
    .sample_en(sample_en),
    .cmp_in   (cmp_in),
    .bit_out  (bit_out)
  );

  // The capture register takes each bit one cycle after it was sampled.
  always_ff @(posedge clk) begin
    if (rst) sample_en_d <= 1'b0;
    else     sample_en_d <= sample_en;
  end

  bit_capture #(.N(CAP_N)) u_cap (
    .clk   (clk),
    .rst   (rst),
    .en    (sample_en_d),
    .bit_in(bit_out),
    .word  (cap_word),
    .trig  (cap_trig)
  );

endmodule
