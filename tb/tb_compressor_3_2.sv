// Self-checking testbench for compressor_3_2.
// Applies all eight input triples, twice each, and checks that 2*c + s is
// the number of ones among x, y, z, counted here independently. A watchdog
// ends the run with a failure if it does not finish in time.
module tb_compressor_3_2;

  logic x, y, z, s, c;
  logic clk = 1'b0;
  int   checks = 0;
  int   failures = 0;

  compressor_3_2 dut (.x(x), .y(y), .z(z), .s(s), .c(c));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : stimulus
    int ones;
    for (int n = 0; n < 16; n++) begin
      @(negedge clk);
      {x, y, z} = 3'(n * 5);
      #1;
      ones = 0;
      if (x) ones++;
      if (y) ones++;
      if (z) ones++;
      checks++;
      if (2 * int'(c) + int'(s) != ones) begin
        failures++;
        $display("FAIL x=%0b y=%0b z=%0b -> c=%0b s=%0b, expected %0d ones", x, y, z, c, s, ones);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule : tb_compressor_3_2
