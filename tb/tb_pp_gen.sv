// Self-checking testbench for pp_gen.
// The default 4-bit instance is driven with all 256 operand pairs; a second
// instance with N = 7 is driven with random operands. Every partial-product
// bit is compared with the corresponding bit of a gated by b[i], and the
// weighted sum of the array with a * b. A watchdog ends the run with a
// failure if it does not finish in time.
module tb_pp_gen;

  localparam int unsigned N4 = 4;
  localparam int unsigned N7 = 7;

  logic clk = 1'b0;
  int   checks = 0;
  int   failures = 0;

  logic [N4-1:0]          a4, b4;
  logic [N4-1:0][N4-1:0]  pp4;
  logic [N7-1:0]          a7, b7;
  logic [N7-1:0][N7-1:0]  pp7;

  pp_gen dut4 (.a(a4), .b(b4), .pp(pp4));
  pp_gen #(.N(N7)) dut7 (.a(a7), .b(b7), .pp(pp7));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : stimulus
    int unsigned total;
    for (int n = 0; n < 256; n++) begin
      @(negedge clk);
      a4 = 4'(n);
      b4 = 4'(n >> 4);
      a7 = 7'($urandom);
      b7 = 7'($urandom);
      #1;
      total = 0;
      for (int i = 0; i < N4; i++) begin
        checks++;
        if (pp4[i] !== (b4[i] ? a4 : '0)) begin
          failures++;
          $display("FAIL N=4 a=%h b=%h row %0d = %b", a4, b4, i, pp4[i]);
        end
        for (int j = 0; j < N4; j++) total += int'(pp4[i][j]) << (i + j);
      end
      checks++;
      if (total != int'(a4) * int'(b4)) begin
        failures++;
        $display("FAIL N=4 weighted sum %0d, expected %0d", total, int'(a4) * int'(b4));
      end
      total = 0;
      for (int i = 0; i < N7; i++) begin
        checks++;
        if (pp7[i] !== (b7[i] ? a7 : '0)) begin
          failures++;
          $display("FAIL N=7 a=%h b=%h row %0d = %b", a7, b7, i, pp7[i]);
        end
        for (int j = 0; j < N7; j++) total += int'(pp7[i][j]) << (i + j);
      end
      checks++;
      if (total != int'(a7) * int'(b7)) begin
        failures++;
        $display("FAIL N=7 weighted sum %0d, expected %0d", total, int'(a7) * int'(b7));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule : tb_pp_gen
