// Self-checking testbench for wallace_ppp.
// The reduction tree must preserve the weighted sum of any 4x4 bit array,
// not only of arrays that come from two operands. All 65,536 arrays are
// applied; for each, low + ((row_x + row_y) << 3) is compared with
// sum(pp[i][j] << (i+j)), computed here. The tree's carry cells are counted
// so that the run shows every stage producing carries. A watchdog ends the
// run with a failure if it does not finish in time.
module tb_wallace_ppp;

  import wallace_pkg::*;

  logic       clk = 1'b0;
  int         checks = 0;
  int         failures = 0;
  int         low_ones[3];

  pp_matrix_t pp;
  logic [2:0] low;
  logic [3:0] row_x, row_y;

  wallace_ppp dut (.pp(pp), .low(low), .row_x(row_x), .row_y(row_y));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (70000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : stimulus
    int unsigned want, got;
    for (int n = 0; n < 65536; n++) begin
      @(negedge clk);
      pp = pp_matrix_t'(n);
      #1;
      want = 0;
      for (int i = 0; i < 4; i++)
        for (int j = 0; j < 4; j++)
          want += int'(pp[i][j]) << (i + j);
      got = int'(low) + ((int'(row_x) + int'(row_y)) << 3);
      checks++;
      if (got != want) begin
        failures++;
        if (failures < 10)
          $display("FAIL pp=%h low=%b x=%b y=%b -> %0d, expected %0d",
                   pp, low, row_x, row_y, got, want);
      end
      for (int k = 0; k < 3; k++) if (low[k]) low_ones[k]++;
    end
    // Each final low bit must toggle during the sweep.
    for (int k = 0; k < 3; k++) begin
      checks++;
      if (low_ones[k] == 0 || low_ones[k] == 65536) begin
        failures++;
        $display("FAIL product bit %0d never changed", k);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule : tb_wallace_ppp
