// sw_cell_core: the arithmetic of one Smith-Waterman cell.
//
// Combinational datapath of the basic systolic cell:
//   s  = SeqCmp(nq, ns)
//   c0 = max(0, h_diag + s)              adder, then comparator against 0
//   c1 = max(h_left - d, h_up - d)       two adders and a comparator
//   h  = max(c0, c1)                      final comparator
// i.e. H(i,j) = max(0, H(i-1,j-1) + s, H(i-1,j) - d, H(i,j-1) - d) with a
// linear gap penalty d. The operator structure follows the source design;
// there the surrounding buffers (diagonal delay, H register) live in the
// enclosing block, rve_block. Results are assumed to fit in SCORE_W bits;
// the sign bit of the final maximum is always 0 (c0 >= 0) and is dropped.
module sw_cell_core
  import sw_pkg::*;
#(
  parameter int MATCH    = DEF_MATCH,
  parameter int MISMATCH = DEF_MISMATCH
) (
  input  char_t  nq,
  input  char_t  ns,
  input  score_t h_diag,
  input  score_t h_left,
  input  score_t h_up,
  input  score_t gap_d,
  output score_t h
);

  sscore_t s, diag_sum, c0, gap_left, gap_up, c1, best;

  seq_cmp #(.MATCH(MATCH), .MISMATCH(MISMATCH)) u_cmp (.nq(nq), .ns(ns), .s(s));

  always_comb begin
    diag_sum = sscore_t'({1'b0, h_diag}) + s;
    c0       = (diag_sum < 0) ? '0 : diag_sum;
    gap_left = sscore_t'({1'b0, h_left}) - sscore_t'({1'b0, gap_d});
    gap_up   = sscore_t'({1'b0, h_up})   - sscore_t'({1'b0, gap_d});
    c1       = (gap_left > gap_up) ? gap_left : gap_up;
    best     = (c0 > c1) ? c0 : c1;
    h        = best[SCORE_W-1:0];
  end

endmodule
