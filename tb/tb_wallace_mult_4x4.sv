// End-to-end testbench for wallace_mult_4x4, at the design's only size.
// Every one of the 256 operand pairs is applied once in order and once more
// in random order, one pair per clock period; the product is sampled one time unit
// after the operands change (the multiplier is combinational, so it must be
// valid within the same cycle) and compared with a * b.
// It also counts how often each mechanism of the design is exercised: a
// carry out of a stage-1 half adder and of a stage-1 3:2 compressor, a carry
// out of a stage-2 half adder and of a stage-2 3:2 compressor, a carry that
// ripples across the whole final adder and the final adder's carry out into
// product bit 7. A mechanism that never occurs counts as a failure.
// A watchdog ends the run with a failure if it does not finish in time.
module tb_wallace_mult_4x4;

  logic       clk = 1'b0;
  int         checks = 0;
  int         failures = 0;

  logic [3:0] a, b;
  logic [7:0] p;

  int n_s1_ha_carry, n_s1_cmp_carry, n_s2_ha_carry, n_s2_cmp_carry;
  int n_final_ripple, n_final_cout;

  wallace_mult_4x4 dut (.a(a), .b(b), .p(p));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(input logic [3:0] av, input logic [3:0] bv);
    @(negedge clk);
    a = av;
    b = bv;
    #1;
    checks++;
    if (p !== 8'(av) * 8'(bv)) begin
      failures++;
      $display("FAIL %0d * %0d -> %0d", av, bv, p);
    end
    if (dut.u_ppp.s1_w1_c || dut.u_ppp.s1_w4_c)                      n_s1_ha_carry++;
    if (dut.u_ppp.s1_w2_c || dut.u_ppp.s1_w3_c)                      n_s1_cmp_carry++;
    if (dut.u_ppp.s2_w2_c)                                           n_s2_ha_carry++;
    if (dut.u_ppp.s2_w3_c || dut.u_ppp.s2_w4_c || dut.u_ppp.s2_w5_c) n_s2_cmp_carry++;
    if (&dut.u_final.carry[3:1])                                     n_final_ripple++;
    if (dut.u_final.cout)                                            n_final_cout++;
  endtask

  initial begin : stimulus
    int order[256];
    int t, k;
    for (int n = 0; n < 256; n++) apply(4'(n), 4'(n >> 4));
    for (int n = 0; n < 256; n++) order[n] = n;
    for (int n = 255; n > 0; n--) begin
      k = int'($urandom % (n + 1));
      t = order[n]; order[n] = order[k]; order[k] = t;
    end
    for (int n = 0; n < 256; n++) apply(4'(order[n]), 4'(order[n] >> 4));

    $display("stage-1 HA carries %0d, stage-1 3:2 carries %0d", n_s1_ha_carry, n_s1_cmp_carry);
    $display("stage-2 HA carries %0d, stage-2 3:2 carries %0d", n_s2_ha_carry, n_s2_cmp_carry);
    $display("final adder full ripples %0d, carry outs %0d", n_final_ripple, n_final_cout);
    checks += 6;
    if (n_s1_ha_carry  == 0) begin failures++; $display("FAIL no stage-1 half-adder carry"); end
    if (n_s1_cmp_carry == 0) begin failures++; $display("FAIL no stage-1 compressor carry"); end
    if (n_s2_ha_carry  == 0) begin failures++; $display("FAIL no stage-2 half-adder carry"); end
    if (n_s2_cmp_carry == 0) begin failures++; $display("FAIL no stage-2 compressor carry"); end
    if (n_final_ripple == 0) begin failures++; $display("FAIL no full ripple in final adder"); end
    if (n_final_cout   == 0) begin failures++; $display("FAIL no final-adder carry out"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule : tb_wallace_mult_4x4
