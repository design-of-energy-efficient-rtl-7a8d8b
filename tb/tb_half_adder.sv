// Self-checking testbench for half_adder.
// Applies all four input pairs, each several times in varying order, and
// compares {c, s} with a + b computed here. A watchdog ends the run with a
// failure if it does not finish in time.
module tb_half_adder;

  logic a, b, s, c;
  logic clk = 1'b0;
  int   checks = 0;
  int   failures = 0;

  half_adder dut (.a(a), .b(b), .s(s), .c(c));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : stimulus
    logic [1:0] expected;
    for (int n = 0; n < 16; n++) begin
      @(negedge clk);
      {a, b} = 2'((n * 3) % 4);
      #1;
      expected = 2'(a) + 2'(b);
      checks++;
      if ({c, s} !== expected) begin
        failures++;
        $display("FAIL a=%0b b=%0b -> c=%0b s=%0b, expected %02b", a, b, c, s, expected);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule : tb_half_adder
