// acbp_ghr: global history register, the first history level of the
// alloyed-correlated branch predictor.
//
// A W-bit shift register that records the real direction of the most recent
// W conditional branches (1 = taken). When a conditional branch resolves in
// the decode stage (update = 1) its outcome (taken, the processor's pcsrcD)
// is shifted in at bit 0 and the oldest outcome drops out of bit W-1, so bit 0
// is always the most recent branch. The register is read combinationally in
// the fetch stage (ghr), where bits [1:0] choose the PHT set and the upper
// bits form half of the PHT index.
//
// The 7-bit width and the use of real (not speculative) outcomes follow the
// published design. The shift direction and the reset value of all zeros are
// this design's choices. Timing: one clock; synchronous, active-high reset.
module acbp_ghr #(
  parameter int unsigned W = acbp_pkg::GHR_W
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         update,  // a conditional branch leaves decode this cycle
  input  logic         taken,   // its real direction
  output logic [W-1:0] ghr      // history, bit 0 = most recent branch
);

  always_ff @(posedge clk) begin
    if (rst)         ghr <= '0;
    else if (update) ghr <= {ghr[W-2:0], taken};
  end

endmodule
