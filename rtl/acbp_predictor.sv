// acbp_predictor: alloyed-correlated branch predictor for a five-stage
// pipelined 32-bit MIPS processor.
//
// Fetch stage (combinational): the 10-bit index seltF is GHR[6:2]
// concatenated with PC[6:2], as in an alloyed predictor; it selects one of
// the 1024 PHT entries. GHR[1:0] then selects one of the entry's four sets, as
// in a correlated predictor. The MSB of the 2-bit counter in that set is the
// prediction, predictF (1 = taken).
//
// Decode stage (one cycle later): the counter value, the index and the set
// select of the fetched instruction are carried in pipeline registers. When
// the instruction in decode is a conditional branch (branchD) and the decode
// stage advances (not stallD), its real direction pcsrcD drives the
// saturating-counter FSM, whose updated value predfsmop is written back to
// the same PHT location, and pcsrcD is shifted into the GHR. mispredictD
// flags a branch whose real direction differs from its prediction; the
// processor uses it to squash the wrongly fetched instruction.
//
// Follows the published design: the GHR and PHT sizes, the index and set
// selection, counter initialisation to 2'b11, update in decode with pcsrcD,
// the Mealy counter. This design's own choices: the processor-side handshake
// (branchD qualifies updates, stallD holds and flushD clears the decode-stage
// registers as in the host pipeline), carrying the fetch-time index and set
// to decode so that a branch updates the counter that predicted it, and the
// mispredictD output. There is no branch target buffer: the target of a
// predicted-taken branch is the processor's concern.
module acbp_predictor #(
  parameter int unsigned   PC_W      = 32,
  parameter int unsigned   GHR_W     = acbp_pkg::GHR_W,
  parameter int unsigned   SET_W     = acbp_pkg::SET_W,
  parameter int unsigned   PC_IDX_W  = acbp_pkg::PC_IDX_W,
  parameter int unsigned   PC_LSB    = acbp_pkg::PC_LSB
) (
  input  logic             clk,
  input  logic             rst,
  // fetch stage
  input  logic [PC_W-1:0]  pcF,          // address of the instruction fetched
  output logic             predictF,     // 1: predicted taken
  // decode stage
  input  logic             stallD,       // decode stage holds its instruction
  input  logic             flushD,       // decode stage is squashed at the edge
  input  logic             branchD,      // instruction in decode is a conditional branch
  input  logic             pcsrcD,       // its real direction (1: taken)
  output logic             predictD,     // direction predicted for the decode instruction
  output logic             mispredictD,  // branch in decode was mispredicted
  // observation
  output logic [GHR_W-1:0] ghr           // global history, bit 0 = most recent
);
  import acbp_pkg::ctr_t;

  localparam int unsigned GHR_IDX_W = GHR_W - SET_W;
  localparam int unsigned IDX_W     = GHR_IDX_W + PC_IDX_W;

  // ---------------- fetch stage ----------------
  logic [IDX_W-1:0] seltF;
  logic [SET_W-1:0] setF;
  ctr_t             predict;

  assign seltF    = {ghr[GHR_W-1 -: GHR_IDX_W], pcF[PC_LSB +: PC_IDX_W]};
  assign setF     = ghr[SET_W-1:0];
  assign predictF = predict[1];

  // ---------------- fetch/decode registers ----------------
  logic [IDX_W-1:0] seltD;
  logic [SET_W-1:0] setD;
  ctr_t             predictDq, predfsmop;
  logic             update;

  always_ff @(posedge clk) begin
    if (rst) begin
      seltD <= '0;
      setD  <= '0;
    end else if (!stallD) begin
      seltD <= flushD ? '0 : seltF;
      setD  <= flushD ? '0 : setF;
    end
  end

  acbp_sat_counter u_ctr (
    .clk      (clk),
    .rst      (rst),
    .en       (!stallD),
    .clr      (flushD),
    .predict  (predict),
    .pcsrcD   (pcsrcD),
    .predictD (predictDq),
    .predfsmop(predfsmop)
  );

  // ---------------- decode stage ----------------
  assign update      = branchD && !stallD;
  assign predictD    = predictDq[1];
  assign mispredictD = update && (predictD != pcsrcD);

  acbp_pht #(
    .IDX_W(IDX_W),
    .SET_W(SET_W)
  ) u_pht (
    .clk    (clk),
    .rst    (rst),
    .rd_selt(seltF),
    .rd_set (setF),
    .rd_ctr (predict),
    .we     (update),
    .wr_selt(seltD),
    .wr_set (setD),
    .wr_ctr (predfsmop)
  );

  acbp_ghr #(
    .W(GHR_W)
  ) u_ghr (
    .clk   (clk),
    .rst   (rst),
    .update(update),
    .taken (pcsrcD),
    .ghr   (ghr)
  );

endmodule
