// tb_acbp_predictor: end-to-end, self-checking test of the alloyed-correlated
// branch predictor at its default size (7-bit GHR, 1024 x 4 x 2-bit PHT).
//
// A reference model kept in this testbench (its own history table, global
// history and fetch/decode registers) predicts every output. Each cycle the
// testbench presents a fetch address drawn from a small set of branch sites,
// and for the instruction in decode a random mix of conditional branches with
// outcomes that are correlated with the previous outcome, stalls and
// flushes. It checks predictF in the same cycle as pcF, and predictD and
// mispredictD one cycle later, plus the global history. It counts how often
// each mechanism occurs: taken and not-taken predictions, mispredictions,
// counter saturation at 2'b11 and 2'b00, updates while the decode stage
// advances, stalls of a branch, flushes, and back-to-back branches; a
// mechanism that never occurs is a failure.
module tb_acbp_predictor;
  import acbp_pkg::*;

  logic clk = 1'b0;
  logic rst;
  logic [31:0] pcF;
  logic predictF, stallD, flushD, branchD, pcsrcD, predictD, mispredictD;
  logic [GHR_W-1:0] ghr;

  int checks = 0, failures = 0;

  // reference state
  logic [1:0] r_pht [ENTRIES][SETS];
  logic [GHR_W-1:0] r_ghr;
  logic [IDX_W-1:0] r_seltD;
  logic [SET_W-1:0] r_setD;
  logic [1:0]       r_ctrD;

  // mechanism counters
  int n_pred_t = 0, n_pred_nt = 0, n_mispred = 0, n_sat_hi = 0, n_sat_lo = 0;
  int n_update = 0, n_stall_br = 0, n_flush = 0, n_b2b = 0;

  always #5 clk = ~clk;

  acbp_predictor dut (.*);

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  function automatic logic [1:0] sat(input logic [1:0] c, input logic t);
    int v;
    v = int'(c) + (t ? 1 : -1);
    if (v > 3) v = 3;
    if (v < 0) v = 0;
    return v[1:0];
  endfunction

  initial begin
    logic [IDX_W-1:0] selt_f;
    logic [SET_W-1:0] set_f;
    logic [1:0]       ctr_f;
    logic             upd, last_taken, prev_upd;
    rst = 1'b1; pcF = '0; stallD = 1'b0; flushD = 1'b0; branchD = 1'b0; pcsrcD = 1'b0;
    @(negedge clk);
    @(negedge clk);
    rst = 1'b0;
    for (int e = 0; e < ENTRIES; e++)
      for (int s = 0; s < SETS; s++) r_pht[e][s] = 2'b11;
    r_ghr = '0; r_seltD = '0; r_setD = '0; r_ctrD = 2'b11;
    last_taken = 1'b0; prev_upd = 1'b0;

    for (int cyc = 0; cyc < 30000; cyc++) begin
      // stimulus for this cycle
      pcF     = {24'h0040_00, 2'b00, 3'($urandom_range(0, 7)), 3'b000} + 32'($urandom_range(0, 1) << 2);
      stallD  = ($urandom_range(0, 9) == 0);
      flushD  = ($urandom_range(0, 14) == 0);
      branchD = ($urandom_range(0, 2) != 0);
      // mostly repeat or alternate the previous outcome so history helps
      case ($urandom_range(0, 9))
        0, 1, 2, 3, 4: pcsrcD = last_taken;
        5, 6, 7:       pcsrcD = !last_taken;
        default:       pcsrcD = $urandom_range(0, 1) == 1;
      endcase
      if (cyc > 20000 && cyc < 24000) begin  // long all-not-taken stretch
        pcsrcD = 1'b0;
        stallD = 1'b0;
      end
      if (cyc < 3000) pcsrcD = 1'b1;          // long all-taken stretch
      #1;
      // reference fetch-stage read
      selt_f = {r_ghr[GHR_W-1 -: GHR_IDX_W], pcF[PC_LSB +: PC_IDX_W]};
      set_f  = r_ghr[SET_W-1:0];
      ctr_f  = r_pht[selt_f][set_f];
      upd    = branchD && !stallD;
      check(predictF == ctr_f[1], $sformatf("predictF %b expected %b", predictF, ctr_f[1]));
      check(predictD == r_ctrD[1], $sformatf("predictD %b expected %b", predictD, r_ctrD[1]));
      check(mispredictD == (upd && (r_ctrD[1] != pcsrcD)),
            $sformatf("mispredictD %b", mispredictD));
      check(ghr == r_ghr, $sformatf("ghr %b expected %b", ghr, r_ghr));
      // mechanism counts
      if (ctr_f[1]) n_pred_t++; else n_pred_nt++;
      if (upd && (r_ctrD[1] != pcsrcD)) n_mispred++;
      if (upd && r_ctrD == 2'b11 && pcsrcD) n_sat_hi++;
      if (upd && r_ctrD == 2'b00 && !pcsrcD) n_sat_lo++;
      if (upd) n_update++;
      if (branchD && stallD) n_stall_br++;
      if (flushD && !stallD) n_flush++;
      if (upd && prev_upd) n_b2b++;
      // reference clock edge
      @(posedge clk);
      if (upd) begin
        r_pht[r_seltD][r_setD] = sat(r_ctrD, pcsrcD);
        r_ghr = {r_ghr[GHR_W-2:0], pcsrcD};
        last_taken = pcsrcD;
      end
      if (!stallD) begin
        r_ctrD  = flushD ? 2'b11 : ctr_f;
        r_seltD = flushD ? '0 : selt_f;
        r_setD  = flushD ? '0 : set_f;
      end
      prev_upd = upd;
      @(negedge clk);
    end

    $display("mechanisms: pred_taken=%0d pred_not_taken=%0d mispredict=%0d sat_11=%0d sat_00=%0d",
             n_pred_t, n_pred_nt, n_mispred, n_sat_hi, n_sat_lo);
    $display("            updates=%0d stalled_branch=%0d flush=%0d back_to_back=%0d",
             n_update, n_stall_br, n_flush, n_b2b);
    check(n_pred_t > 0,   "no taken prediction");
    check(n_pred_nt > 0,  "no not-taken prediction");
    check(n_mispred > 0,  "no misprediction");
    check(n_sat_hi > 0,   "no saturation at 2'b11");
    check(n_sat_lo > 0,   "no saturation at 2'b00");
    check(n_update > 0,   "no update");
    check(n_stall_br > 0, "no stalled branch");
    check(n_flush > 0,    "no flush");
    check(n_b2b > 0,      "no back-to-back branches");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
