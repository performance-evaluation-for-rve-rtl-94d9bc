// seq_cmp: similarity score of two sequence characters (SeqCmp).
//
// Purely combinational. When the query character nq equals the database
// character ns the output s is the match score, otherwise the mismatch
// score. Both scores are parameters; the source design gives this rule but
// not the values, so MATCH = +2 and MISMATCH = -1 are this design's defaults.
module seq_cmp
  import sw_pkg::*;
#(
  parameter int MATCH    = DEF_MATCH,
  parameter int MISMATCH = DEF_MISMATCH
) (
  input  char_t   nq,
  input  char_t   ns,
  output sscore_t s
);

  always_comb begin
    if (nq == ns) s = sscore_t'(MATCH);
    else          s = sscore_t'(MISMATCH);
  end

endmodule
