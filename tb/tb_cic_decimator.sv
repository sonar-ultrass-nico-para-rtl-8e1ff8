// tb_cic_decimator: runs cic_decimator at its default decimation of 625.
// The bitstream is random with a density of ones that changes from window
// to window (including runs of all-zeros and all-ones windows), and an out_en strobe
// comes every 625 clocks. A software model counts +1/-1 per bit over each
// window and computes trunc(sum * 2^14 / 625) directly; every output must
// match it exactly, arrive one clock after out_en, and the all-ones and
// all-zeros windows must give exactly +1.0 and -1.0.
module tb_cic_decimator;
  import sonar_pkg::*;
  localparam int M = 625;
  localparam int NWIN = 60;
  logic   clk = 1'b0;
  logic   rst = 1'b1;
  logic   bit_in = 1'b0, out_en = 1'b0;
  q2_14_t y;
  logic   out_valid;
  int     checks = 0, failures = 0;
  int     acc = 0;
  int     expected = 0;
  int     nout = 0;
  bit     expect_valid = 1'b0;
  int     density;

  cic_decimator dut (.clk(clk), .rst(rst), .bit_in(bit_in), .out_en(out_en), .y(y), .out_valid(out_valid));

  always #5 clk = ~clk;

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    for (int w = 0; w < NWIN; w++) begin
      case (w % 6)
        1, 2: density = 0;     // all zeros -> -1.0
        3, 4: density = 1000;  // all ones  -> +1.0
        default: density = $urandom_range(0, 1000);
      endcase
      for (int c = 0; c < M; c++) begin
        // inputs for the coming rising edge
        bit_in = ($urandom_range(0, 999) < density);
        out_en = (c == M - 1);
        if (out_en) begin
          expected = (acc * (1 << FRAC_W)) / M;
          acc = 0;
        end
        acc += bit_in ? 1 : -1;
        @(posedge clk); #1;
        checks++;
        if (out_valid !== out_en) begin
          failures++; $display("FAIL: out_valid=%0b in window %0d cycle %0d", out_valid, w, c);
        end
        if (out_en) begin
          nout++;
          checks++;
          if (int'(y) != expected) begin
            failures++; $display("FAIL: window %0d y=%0d expected %0d", w, y, expected);
          end
          // a window also holds the last bit of the window before it, so
          // the second of two all-zero (all-one) windows must be exact
          if (w % 6 == 2) begin
            checks++; if (y != Q_MINUS1) begin failures++; $display("FAIL: all-zero window gave %0d", y); end
          end
          if (w % 6 == 4) begin
            checks++; if (y != Q_ONE) begin failures++; $display("FAIL: all-one window gave %0d", y); end
          end
        end
        @(negedge clk);
      end
    end
    checks++;
    if (nout != NWIN) begin failures++; $display("FAIL: %0d outputs", nout); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NWIN * M + 1000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
