// acbp_sat_counter: the 2-bit saturating counter of the alloyed-correlated
// branch predictor, built as a Mealy finite state machine.
//
// The current-state register holds predictD, the counter value that was read
// from the PHT in the fetch stage for the instruction now in decode. It loads
// `predict` every cycle the decode stage advances (en = 1). The next-state
// logic is combinational: predfsmop is predictD plus one when the branch is
// really taken (pcsrcD = 1) and minus one when it is not, saturating at 2'b11
// and 2'b00. predfsmop depends on both the current state and the pcsrcD input
// (Mealy); the predictor writes it back into the PHT. The MSB of predictD is
// the direction that was predicted for the branch in decode.
//
// The state encoding, the increment/decrement rule and the Mealy split into
// next-state logic and a D-type state register follow the published design.
// The enable (pipeline stall), the synchronous clear (pipeline flush) and the
// reset value 2'b11 for the state register are this design's choices.
// Timing: predictD changes at the clock edge; predfsmop is valid in the same
// cycle as pcsrcD.
module acbp_sat_counter (
  input  logic           clk,
  input  logic           rst,
  input  logic           en,        // decode stage advances (not stalled)
  input  logic           clr,       // decode stage is flushed
  input  acbp_pkg::ctr_t predict,   // counter read in fetch
  input  logic           pcsrcD,    // real direction of the branch in decode
  output acbp_pkg::ctr_t predictD,  // current state
  output acbp_pkg::ctr_t predfsmop  // updated counter (Mealy output)
);
  import acbp_pkg::*;

  // Current-state register.
  always_ff @(posedge clk) begin
    if (rst || (en && clr)) predictD <= CTR_INIT;
    else if (en)            predictD <= predict;
  end

  // Next-state / output logic.
  always_comb begin
    unique case (predictD)
      CTR_STRONG_NT: predfsmop = pcsrcD ? CTR_WEAK_NT  : CTR_STRONG_NT;
      CTR_WEAK_NT:   predfsmop = pcsrcD ? CTR_WEAK_T   : CTR_STRONG_NT;
      CTR_WEAK_T:    predfsmop = pcsrcD ? CTR_STRONG_T : CTR_WEAK_NT;
      CTR_STRONG_T:  predfsmop = pcsrcD ? CTR_STRONG_T : CTR_WEAK_T;
      default:       predfsmop = predictD;
    endcase
  end

endmodule
