// acbp_pkg: constants and types shared by the alloyed-correlated branch
// predictor.
//
// The predictor keeps two levels of history. The first level is a 7-bit
// global history register (GHR) of real branch outcomes. The second level is
// a pattern history table (PHT) of 1024 entries, each of four sets, each set
// one 2-bit saturating counter. An entry is picked by the 10-bit "selt" index,
// GHR[6:2] concatenated with PC[6:2] (the alloyed part); the set inside the
// entry is picked by GHR[1:0] (the correlated part). All of these sizes, the
// counter's reset value 2'b11 and the use of the counter MSB as the prediction
// are the published design's; the names of the types are this design's own.
package acbp_pkg;

  // First level: global history register width.
  parameter int unsigned GHR_W      = 7;
  // GHR bits used for the set select (low bits) and for the index (the rest).
  parameter int unsigned SET_W      = 2;
  parameter int unsigned GHR_IDX_W  = GHR_W - SET_W;            // 5
  // PC bits used for the index: PC[PC_LSB +: PC_IDX_W] = PC[6:2].
  parameter int unsigned PC_IDX_W   = 5;
  parameter int unsigned PC_LSB     = 2;
  // Second level: PHT geometry.
  parameter int unsigned IDX_W      = GHR_IDX_W + PC_IDX_W;     // 10
  parameter int unsigned ENTRIES    = 1 << IDX_W;               // 1024
  parameter int unsigned SETS       = 1 << SET_W;               // 4
  parameter int unsigned CTR_W      = 2;

  // 2-bit saturating counter states; the MSB is the predicted direction.
  typedef enum logic [CTR_W-1:0] {
    CTR_STRONG_NT = 2'b00,
    CTR_WEAK_NT   = 2'b01,
    CTR_WEAK_T    = 2'b10,
    CTR_STRONG_T  = 2'b11
  } ctr_t;

  // Value every counter holds after reset.
  parameter ctr_t CTR_INIT = CTR_STRONG_T;

  typedef logic [IDX_W-1:0] selt_t;
  typedef logic [SET_W-1:0] set_t;
  typedef logic [GHR_W-1:0] ghr_t;

endpackage
