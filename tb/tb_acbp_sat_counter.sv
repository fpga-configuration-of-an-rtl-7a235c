// tb_acbp_sat_counter: self-checking test of the 2-bit saturating counter FSM.
//
// Loads every counter value into the current-state register, applies both
// branch outcomes and compares predfsmop with the increment/decrement rule
// saturating at 0 and 3, worked out here with integer arithmetic. Also checks
// that the register holds while en = 0, clears to 2'b11 on a flush and resets
// to 2'b11, and that the load takes exactly one clock.
module tb_acbp_sat_counter;
  import acbp_pkg::*;

  logic clk = 1'b0;
  logic rst, en, clr, pcsrcD;
  ctr_t predict, predictD, predfsmop;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  acbp_sat_counter dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (200) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int exp_v;
    rst = 1'b1; en = 1'b1; clr = 1'b0; pcsrcD = 1'b0; predict = CTR_STRONG_NT;
    @(negedge clk);
    check(predictD == CTR_STRONG_T, "reset value is 2'b11");
    rst = 1'b0;
    for (int v = 0; v < 4; v++) begin
      predict = ctr_t'(v);
      #1 check(predictD != ctr_t'(v) || v == 3, "state register does not load before the edge");
      @(negedge clk);
      check(predictD == ctr_t'(v), $sformatf("state loads %0d in one clock", v));
      for (int t = 0; t < 2; t++) begin
        pcsrcD = t[0];
        #1;
        exp_v = t ? ((v == 3) ? 3 : v + 1) : ((v == 0) ? 0 : v - 1);
        check(int'(predfsmop) == exp_v,
              $sformatf("state %0d taken %0d: got %0d expected %0d", v, t, predfsmop, exp_v));
      end
    end
    // hold while the decode stage is stalled
    predict = CTR_WEAK_NT; @(negedge clk);
    en = 1'b0; predict = CTR_STRONG_T; @(negedge clk); @(negedge clk);
    check(predictD == CTR_WEAK_NT, "register holds while en = 0");
    // a flush while stalled does nothing, a flush while advancing clears
    clr = 1'b1; @(negedge clk);
    check(predictD == CTR_WEAK_NT, "flush ignored while stalled");
    en = 1'b1; predict = CTR_STRONG_NT; @(negedge clk);
    check(predictD == CTR_STRONG_T, "flush loads 2'b11");
    clr = 1'b0; @(negedge clk);
    check(predictD == CTR_STRONG_NT, "load after flush");
    rst = 1'b1; @(negedge clk);
    check(predictD == CTR_STRONG_T, "synchronous reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
