// tb_bit_capture: feeds random bits with random sampling strobes into
// bit_capture (N = 36) and checks the parallel word against a software
// shift register after every strobe, and that trig fires for exactly one
// cycle after every 36th sample and at no other time.
module tb_bit_capture;
  localparam int N = 36;
  logic clk = 1'b0;
  logic rst = 1'b1;
  logic en = 1'b0, bit_in = 1'b0;
  logic [N-1:0] word;
  logic trig;
  logic [N-1:0] model = '0;
  int   nsamp = 0, ntrig = 0;
  int   checks = 0, failures = 0;

  bit_capture dut (.clk(clk), .rst(rst), .en(en), .bit_in(bit_in), .word(word), .trig(trig));

  always #5 clk = ~clk;

  initial begin
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;
    for (int i = 0; i < 6000; i++) begin
      @(negedge clk);
      en     = ($urandom_range(0, 1) == 1);
      bit_in = ($urandom_range(0, 1) == 1);
      if (en) begin
        model = {model[N-2:0], bit_in};
        nsamp++;
      end
      @(posedge clk); #1;
      checks++;
      if (word !== model) begin
        failures++; $display("FAIL: word %h expected %h", word, model);
      end
      checks++;
      if (trig !== (en && nsamp % N == 0)) begin
        failures++; $display("FAIL: trig=%0b after %0d samples", trig, nsamp);
      end
      if (trig) ntrig++;
    end
    checks++;
    if (ntrig != nsamp / N) begin failures++; $display("FAIL: %0d triggers", ntrig); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
