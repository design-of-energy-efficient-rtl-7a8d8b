// Self-checking testbench for csa_adder.
// The default 4-bit instance is driven with all 256 input pairs, a 9-bit
// instance with random pairs; {cout, sum} is compared with x + y. A watchdog
// ends the run with a failure if it does not finish in time.
module tb_csa_adder;

  localparam int unsigned W9 = 9;

  logic clk = 1'b0;
  int   checks = 0;
  int   failures = 0;

  logic [3:0]    x4, y4, s4;
  logic          c4;
  logic [W9-1:0] x9, y9, s9;
  logic          c9;

  csa_adder dut4 (.x(x4), .y(y4), .sum(s4), .cout(c4));
  csa_adder #(.W(W9)) dut9 (.x(x9), .y(y9), .sum(s9), .cout(c9));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : stimulus
    for (int n = 0; n < 512; n++) begin
      @(negedge clk);
      x4 = 4'(n);
      y4 = 4'(n >> 4);
      x9 = W9'($urandom);
      y9 = W9'($urandom);
      if (n == 256) begin x9 = '1; y9 = W9'(1); end  // full carry ripple
      #1;
      checks++;
      if ({c4, s4} != 5'(x4) + 5'(y4)) begin
        failures++;
        $display("FAIL W=4 %0d + %0d -> %0d", x4, y4, {c4, s4});
      end
      checks++;
      if ({c9, s9} != (W9+1)'(x9) + (W9+1)'(y9)) begin
        failures++;
        $display("FAIL W=9 %0d + %0d -> %0d", x9, y9, {c9, s9});
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule : tb_csa_adder
