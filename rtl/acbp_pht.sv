// acbp_pht: pattern history table, the second history level of the
// alloyed-correlated branch predictor.
//
// ENTRIES = 2**IDX_W entries, each holding SETS = 2**SET_W sets, each set one
// 2-bit saturating counter. Reading is combinational, for the fetch stage:
// rd_selt picks the entry and rd_set picks one set inside it; the counter in
// that set is rd_ctr, whose MSB is the predicted direction. Writing is
// synchronous, from the decode stage: when we = 1 the counter at
// (wr_selt, wr_set) takes wr_ctr at the clock edge. A read of the location
// written in the same cycle returns the old value (no bypass).
//
// The geometry (1024 x 4 x 2 bits) and the initial value 2'b11 of every
// counter follow the published design. Loading every counter with INIT on a
// synchronous reset (one cycle) is this design's way of providing that
// initial value; so are the missing read/write bypass and the set numbering
// (set s is chosen by GHR[1:0] = s).
module acbp_pht #(
  parameter int unsigned   IDX_W = acbp_pkg::IDX_W,
  parameter int unsigned   SET_W = acbp_pkg::SET_W,
  parameter acbp_pkg::ctr_t INIT = acbp_pkg::CTR_INIT
) (
  input  logic             clk,
  input  logic             rst,
  // fetch-stage read port
  input  logic [IDX_W-1:0] rd_selt,
  input  logic [SET_W-1:0] rd_set,
  output acbp_pkg::ctr_t   rd_ctr,
  // decode-stage write port
  input  logic             we,
  input  logic [IDX_W-1:0] wr_selt,
  input  logic [SET_W-1:0] wr_set,
  input  acbp_pkg::ctr_t   wr_ctr
);

  localparam int unsigned ENTRIES = 1 << IDX_W;
  localparam int unsigned SETS    = 1 << SET_W;

  // One entry: SETS packed 2-bit counters, set s in bits [2s+1:2s].
  typedef logic [SETS-1:0][1:0] entry_t;

  entry_t table_q [ENTRIES];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int e = 0; e < ENTRIES; e++)
        table_q[e] <= {SETS{INIT}};
    end else if (we) begin
      table_q[wr_selt][wr_set] <= wr_ctr;
    end
  end

  assign rd_ctr = acbp_pkg::ctr_t'(table_q[rd_selt][rd_set]);

endmodule
