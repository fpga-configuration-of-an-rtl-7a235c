// tb_acbp_selsort: the predictor running the branch stream of a selection
// sort of 100 integers, for three input orders: already sorted, uniformly
// distributed and normally distributed.
//
// The testbench holds a small behavioural model of the host processor's
// front end. It executes a fixed MIPS-style selection-sort loop (addresses
// 0x00..0x54, three conditional branches: the compare at 0x24, the inner loop
// at 0x30 and the outer loop at 0x50) on the data, which yields the program
// order of instruction addresses, branch outcomes and the address on the
// other path of each branch. It then plays that stream through the
// predictor one instruction per cycle: the instruction after a branch is
// fetched along the predicted direction; when the branch reaches decode and
// is found mispredicted the wrongly fetched instruction is flushed and the
// right one fetched the next cycle, a one-cycle penalty. A reference model
// of the predictor in this testbench checks every prediction.
//
// Checks: every predictF, mispredictD and the final history agree with the
// reference; the model's sort result is ordered; the cycle count equals
// instructions + mispredictions + 4 (one cycle to reach decode, three more to
// leave write-back).
// It prints instructions, branches, mispredictions, prediction accuracy and
// CPI for each input order.
module tb_acbp_selsort;
  import acbp_pkg::*;

  localparam int N = 100;

  logic clk = 1'b0;
  logic rst;
  logic [31:0] pcF;
  logic predictF, stallD, flushD, branchD, pcsrcD, predictD, mispredictD;
  logic [GHR_W-1:0] ghr;

  int checks = 0, failures = 0;

  // instruction stream of one run
  int unsigned s_pc[$];
  bit          s_br[$];
  bit          s_tk[$];
  int unsigned s_alt[$];

  logic [1:0]       r_pht [ENTRIES][SETS];
  logic [GHR_W-1:0] r_ghr;

  always #5 clk = ~clk;

  acbp_predictor dut (.*);

  initial begin
    repeat (400000) @(posedge clk);
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
    if (t) return (c == 2'b11) ? c : c + 2'b01;
    else   return (c == 2'b00) ? c : c - 2'b01;
  endfunction

  task automatic emit(input int unsigned pc);
    s_pc.push_back(pc); s_br.push_back(1'b0); s_tk.push_back(1'b0); s_alt.push_back(0);
  endtask

  // taken: real direction; tgt/fall: the two successors
  task automatic emit_br(input int unsigned pc, input bit taken,
                         input int unsigned tgt, input int unsigned fall);
    s_pc.push_back(pc); s_br.push_back(1'b1); s_tk.push_back(taken);
    s_alt.push_back(taken ? fall : tgt);
  endtask

  // Selection sort, the inner compare: beq (a[j] < a[min]) == 0, skip
  task automatic build_stream(inout int a[N]);
    int mn;
    int t;
    s_pc.delete(); s_br.delete(); s_tk.delete(); s_alt.delete();
    emit('h00); emit('h04);                       // i = 0; n1 = n - 1
    for (int i = 0; i < N - 1; i++) begin
      emit('h08); emit('h0C);                     // outer: j = i + 1; min = i
      mn = i;
      for (int j = i + 1; j < N; j++) begin
        emit('h10); emit('h14); emit('h18); emit('h1C); emit('h20);   // loads, slt
        emit_br('h24, !(a[j] < a[mn]), 'h2C, 'h28);
        if (a[j] < a[mn]) begin
          emit('h28);                             // min = j
          mn = j;
        end
        emit('h2C);                               // skip: j++
        emit_br('h30, (j + 1) != N, 'h10, 'h34);  // bne j, n, inner
      end
      for (int k = 'h34; k <= 'h4C; k += 4) emit(k);                 // swap; i++
      t = a[i]; a[i] = a[mn]; a[mn] = t;
      emit_br('h50, (i + 1) != (N - 1), 'h08, 'h54);                 // bne i, n1, outer
    end
    emit('h54);
  endtask

  task automatic run(input string name, input int a_in[N]);
    int a[N];
    int f, cycles, misp, r_misp, branches, n_instr;
    bit d_valid;
    int d;
    logic [IDX_W-1:0] selt_f, r_seltD;
    logic [SET_W-1:0] set_f, r_setD;
    logic [1:0]       ctr_f, r_ctrD;
    bit   upd, wrong, ordered;

    a = a_in;
    build_stream(a);
    ordered = 1'b1;
    for (int k = 1; k < N; k++) if (a[k-1] > a[k]) ordered = 1'b0;
    check(ordered, {name, ": sort result is ordered"});
    n_instr = s_pc.size();

    // reset predictor and reference
    rst = 1'b1; stallD = 1'b0; flushD = 1'b0; branchD = 1'b0; pcsrcD = 1'b0; pcF = '0;
    @(negedge clk);
    rst = 1'b0;
    for (int e = 0; e < ENTRIES; e++)
      for (int s = 0; s < SETS; s++) r_pht[e][s] = 2'b11;
    r_ghr = '0; r_ctrD = 2'b11; r_seltD = '0; r_setD = '0;

    f = 0; d_valid = 1'b0; d = 0; cycles = 0; misp = 0; r_misp = 0; branches = 0;
    while (f < n_instr || d_valid) begin
      // decode stage
      branchD = d_valid && s_br[d];
      pcsrcD  = d_valid && s_tk[d];
      upd     = branchD;
      #1;
      wrong = mispredictD;
      // fetch stage: along the predicted path of the branch in decode
      if (wrong) pcF = 32'(s_alt[d]);
      else       pcF = (f < n_instr) ? 32'(s_pc[f]) : 32'h54;
      flushD = wrong;
      #1;
      // reference model
      selt_f = {r_ghr[GHR_W-1 -: GHR_IDX_W], pcF[PC_LSB +: PC_IDX_W]};
      set_f  = r_ghr[SET_W-1:0];
      ctr_f  = r_pht[selt_f][set_f];
      check(predictF == ctr_f[1], {name, ": predictF"});
      check(wrong == (upd && (r_ctrD[1] != pcsrcD)), {name, ": mispredictD"});
      if (upd) branches++;
      if (wrong) misp++;
      if (upd && (r_ctrD[1] != pcsrcD)) r_misp++;
      @(posedge clk);
      cycles++;
      if (upd) begin
        r_pht[r_seltD][r_setD] = sat(r_ctrD, pcsrcD);
        r_ghr = {r_ghr[GHR_W-2:0], pcsrcD};
      end
      r_ctrD  = wrong ? 2'b11 : ctr_f;
      r_seltD = wrong ? '0 : selt_f;
      r_setD  = wrong ? '0 : set_f;
      // advance the model pipeline
      if (wrong) begin
        d_valid = 1'b0;                    // squashed wrong-path instruction
      end else if (f < n_instr) begin
        d_valid = 1'b1; d = f; f++;
      end else begin
        d_valid = 1'b0;
      end
      @(negedge clk);
    end
    cycles += 3;  // the last instruction on through execute, memory and write-back
    check(misp == r_misp, {name, ": misprediction count"});
    check(ghr == r_ghr, {name, ": final history"});
    check(cycles == n_instr + misp + 4, {name, ": cycle count"});
    $display("%-8s instructions=%0d branches=%0d mispredictions=%0d accuracy=%0.2f%% cycles=%0d CPI=%0.3f",
             name, n_instr, branches, misp, 100.0 * (branches - misp) / branches,
             cycles, real'(cycles) / n_instr);
    check(branches > 0 && misp > 0, {name, ": branches and mispredictions occur"});
  endtask

  initial begin
    int a[N];
    int unsigned x;
    int acc;
    x = 32'h1234_5678;
    // already sorted, ascending
    for (int k = 0; k < N; k++) a[k] = k;
    run("sorted", a);
    // uniform on 0..999 (xorshift32)
    for (int k = 0; k < N; k++) begin
      x ^= x << 13; x ^= x >> 17; x ^= x << 5;
      a[k] = int'(x % 1000);
    end
    run("uniform", a);
    // approximately normal: sum of twelve uniform 0..99 values
    for (int k = 0; k < N; k++) begin
      acc = 0;
      for (int m = 0; m < 12; m++) begin
        x ^= x << 13; x ^= x >> 17; x ^= x << 5;
        acc += int'(x % 100);
      end
      a[k] = acc;
    end
    run("normal", a);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
