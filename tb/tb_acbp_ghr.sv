// tb_acbp_ghr: self-checking test of the global history register.
//
// Applies random update/taken sequences and compares the register with a
// reference history kept here as an integer (new outcome in bit 0, oldest
// outcome dropped after seven). Checks the reset value, that nothing changes
// without update, and that each shift takes one clock.
module tb_acbp_ghr;
  localparam int W = 7;

  logic clk = 1'b0;
  logic rst, update, taken;
  logic [W-1:0] ghr;
  int checks = 0, failures = 0;
  int unsigned ref_h;

  always #5 clk = ~clk;

  acbp_ghr dut (.*);

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1'b1; update = 1'b0; taken = 1'b0;
    @(negedge clk);
    rst = 1'b0;
    ref_h = 0;
    checks++; if (ghr != '0) begin failures++; $display("FAIL: reset value %b", ghr); end
    for (int i = 0; i < 2000; i++) begin
      update = ($urandom_range(0, 3) != 0);
      taken  = $urandom_range(0, 1) == 1;
      #1;
      checks++;
      if (int'(ghr) != int'(ref_h)) begin
        failures++;
        $display("FAIL: before edge %0d ghr=%b expected %b", i, ghr, ref_h[W-1:0]);
      end
      @(negedge clk);
      if (update) ref_h = ((ref_h << 1) | int'(taken)) % (1 << W);
      checks++;
      if (int'(ghr) != int'(ref_h)) begin
        failures++;
        $display("FAIL: step %0d ghr=%b expected %b", i, ghr, ref_h[W-1:0]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
