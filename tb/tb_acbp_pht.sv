// tb_acbp_pht: self-checking test of the pattern history table.
//
// Checks that after reset every one of the 1024 x 4 counters reads 2'b11,
// then performs random writes and reads against a reference array, checking
// that a write lands only in the addressed set of the addressed entry, that it
// becomes visible one clock later, and that a read of the location being
// written in the same cycle returns the old value.
module tb_acbp_pht;
  import acbp_pkg::*;

  logic clk = 1'b0;
  logic rst, we;
  logic [IDX_W-1:0] rd_selt, wr_selt;
  logic [SET_W-1:0] rd_set, wr_set;
  ctr_t rd_ctr, wr_ctr;
  int checks = 0, failures = 0;
  logic [1:0] ref_t [ENTRIES][SETS];

  always #10 clk = ~clk;

  acbp_pht dut (.*);

  task automatic check_rd(input string what);
    #1;
    checks++;
    if (rd_ctr != ctr_t'(ref_t[rd_selt][rd_set])) begin
      failures++;
      $display("FAIL: %s entry %0d set %0d got %b expected %b",
               what, rd_selt, rd_set, rd_ctr, ref_t[rd_selt][rd_set]);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1'b1; we = 1'b0;
    rd_selt = '0; rd_set = '0; wr_selt = '0; wr_set = '0; wr_ctr = CTR_STRONG_NT;
    @(negedge clk);
    rst = 1'b0;
    for (int e = 0; e < ENTRIES; e++)
      for (int s = 0; s < SETS; s++) ref_t[e][s] = 2'b11;
    // every counter starts at 2'b11
    for (int e = 0; e < ENTRIES; e++)
      for (int s = 0; s < SETS; s++) begin
        rd_selt = IDX_W'(e); rd_set = SET_W'(s);
        check_rd("after reset");
      end
    // random writes, reads focused on a small region so they hit written data
    for (int i = 0; i < 6000; i++) begin
      we      = $urandom_range(0, 1) == 1;
      wr_selt = IDX_W'($urandom_range(0, 15));
      wr_set  = SET_W'($urandom_range(0, 3));
      wr_ctr  = ctr_t'($urandom_range(0, 3));
      if ($urandom_range(0, 3) == 0) begin
        rd_selt = wr_selt; rd_set = wr_set;     // same-cycle read of the written location
      end else begin
        rd_selt = IDX_W'($urandom_range(0, 15));
        rd_set  = SET_W'($urandom_range(0, 3));
      end
      check_rd("before write edge");
      @(negedge clk);
      if (we) ref_t[wr_selt][wr_set] = wr_ctr;
      we = 1'b0;
      rd_selt = wr_selt;
      for (int s = 0; s < SETS; s++) begin
        rd_set = SET_W'(s);
        check_rd("after write");
      end
    end
    // reset again restores 2'b11 everywhere that was written
    rst = 1'b1; @(negedge clk); rst = 1'b0;
    for (int e = 0; e < 16; e++)
      for (int s = 0; s < SETS; s++) begin
        ref_t[e][s] = 2'b11;
        rd_selt = IDX_W'(e); rd_set = SET_W'(s);
        check_rd("after second reset");
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
