// lpf_decimator: low-pass filter and final decimator of one I or Q branch.
//
// Two recursive moving-average filters run in cascade at the 160 kHz
// baseband rate. Each is an integrator (a running sum) followed by a comb
// that subtracts the running sum of K samples earlier, taken from a delay
// line, and divides the difference by K: the result is the mean of the last
// K inputs. The first filter averages K1 = 80 samples, which puts its nulls
// at multiples of 2 kHz; the second averages K2 = 53 samples, which puts its
// first null near 3 kHz, where the first filter's first side lobe peaks. A
// register loaded on the 8 kHz strobe then keeps every 20th result.
//
// Inside the filter words are 23 bits (Q9.14), enough for a sum of 80 Q2.14
// samples; the running sums wrap, which leaves the differences exact. The
// output is the low 16 bits (Q2.14). Division truncates towards zero.
//
// Lengths, word widths, the integrate / delay / comb-and-divide structure
// and the register downsampler are those of the receive channel. The
// synchronous reset (zero history) and the out_valid strobe are this
// implementation's additions.
//
// Timing, counting in_en strobes t: the first comb gives at strobe t the mean
// of the inputs of strobes t-80 .. t-1; the second gives at strobe t the mean
// of the first comb's results of strobes t-54 .. t-2. out_en loads the second
// comb's current result into y; y and out_valid (one-cycle pulse) appear one
// clock after out_en.
module lpf_decimator
  import sonar_pkg::*;
#(
  parameter int unsigned K1 = sonar_pkg::LPF_K1,
  parameter int unsigned K2 = sonar_pkg::LPF_K2,
  parameter int unsigned W  = sonar_pkg::LPF_W
) (
  input  logic   clk,
  input  logic   rst,
  input  logic   in_en,
  input  q2_14_t x,
  input  logic   out_en,
  output q2_14_t y,
  output logic   out_valid
);

  typedef logic signed [W-1:0] word_t;

  localparam word_t DIV1 = word_t'(K1);
  localparam word_t DIV2 = word_t'(K2);

  word_t int1, int1_dly, comb1;   // first moving average
  word_t int2, int2_dly, comb2;   // second moving average
  word_t diff1, diff2;

  delay_line #(.DEPTH(K1), .W(W)) u_dly1 (
    .clk(clk), .rst(rst), .en(in_en), .d(int1), .q(int1_dly)
  );

  delay_line #(.DEPTH(K2), .W(W)) u_dly2 (
    .clk(clk), .rst(rst), .en(in_en), .d(int2), .q(int2_dly)
  );

  always_comb begin
    diff1 = int1 - int1_dly;
    diff2 = int2 - int2_dly;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      int1      <= '0;
      comb1     <= '0;
      int2      <= '0;
      comb2     <= '0;
      y         <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= out_en;
      if (in_en) begin
        int1  <= int1 + word_t'(x);
        comb1 <= diff1 / DIV1;
        int2  <= int2 + comb1;
        comb2 <= diff2 / DIV2;
      end
      if (out_en) y <= q2_14_t'(comb2);
    end
  end

  initial assert ((longint'(K1) << (SAMPLE_W - 1)) < (longint'(1) << (W - 1)))
    else $error("lpf_decimator: window sum does not fit in W bits");

endmodule
