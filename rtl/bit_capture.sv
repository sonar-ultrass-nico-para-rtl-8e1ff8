// bit_capture: serial-to-parallel converter used to record the sigma-delta
// bitstream in a logic analyser's block RAM.
//
// On every sampling strobe the incoming bit is shifted into the least
// significant end of an N-bit word, so the parallel output always holds the
// last N samples, the newest in bit 0. A counter advances with each sample;
// after every N samples it restarts and trig goes high for one clock cycle,
// which is the moment a capture instrument should store the word: at that
// point word holds exactly N samples that have not been stored before.
//
// The shift-into-LSB scheme, the counter and the one-cycle trigger follow
// the capture path of the ADC test set-up, with N = 36 to match the 36-bit
// words of the block RAM. Using the sampling strobe as an enable on the
// system clock, and the synchronous reset, are this implementation's choices.
//
// Interface: clk, rst (synchronous, active high), en (sampling strobe),
// bit_in; word (N bits, updated one cycle after en), trig (one-cycle pulse in
// the same cycle as the word that completes a group of N samples).
module bit_capture #(
  parameter int unsigned N = 36
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         en,
  input  logic         bit_in,
  output logic [N-1:0] word,
  output logic         trig
);

  localparam int unsigned CW = (N > 2) ? $clog2(N) : 1;

  logic [CW-1:0] cnt;

  always_ff @(posedge clk) begin
    if (rst) begin
      word <= '0;
      cnt  <= '0;
      trig <= 1'b0;
    end else if (en) begin
      word <= {word[N-2:0], bit_in};
      if (cnt == CW'(N - 1)) begin
        cnt  <= '0;
        trig <= 1'b1;
      end else begin
        cnt  <= cnt + CW'(1);
        trig <= 1'b0;
      end
    end else begin
      trig <= 1'b0;
    end
  end

  initial assert (N >= 2) else $error("bit_capture: N must be at least 2");

endmodule
