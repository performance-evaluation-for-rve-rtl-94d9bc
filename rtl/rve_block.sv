// rve_block: one RVE building block with blocking factor BF_R x BF_C.
//
// Each clock cycle the block takes a chunk of BF_R consecutive database
// characters (ns_in) and computes, in one cycle, the BF_R x BF_C tile of the
// H matrix formed with its BF_C fixed query characters (nq). Recursive
// variable expansion removes the dependencies between the cells of the
// tile, so the whole tile is one combinational network between registers;
// here that network is written as the BF_R x BF_C grid of cell datapaths
// (sw_cell_core) and left to synthesis to flatten.
//
// Tile inputs, for a tile whose bottom-right cell is H(i,j):
//   h_left_in[r]  H(i-BF_R+1+r, j-BF_C)  previous block's last column,
//                 taken directly from its output registers
//   h_diag_in     the previous block's bottom-right output; buffered one
//                 cycle here, it becomes the corner H(i-BF_R, j-BF_C)
//   own h_out[BF_R-1][c] of the previous cycle is fed back as the row above
//                 the tile, H(i-BF_R, j-BF_C+1+c)
// Row r of the chunk is valid when ns_valid_in[r]; the cells of an invalid
// row are forced to 0, so an idle cycle between two database sequences
// restarts the recurrence. Valid rows must come first in a chunk.
//
// Outputs h_out, ns_out/ns_valid_out (the database chunk delayed one cycle
// for the next block) and max_out are registers: latency is one cycle per
// block. max_out holds the greatest of max_out, max_in and the registered
// tile, as in the source design's cell, which compares its registered H
// value rather than the new one. rst (synchronous, active high) clears all
// registers. The port set follows the source design's 2x2 block; the
// generic BF_R x BF_C form, the valid bits and the reset style are this
// design's own.
module rve_block
  import sw_pkg::*;
#(
  parameter int BF_R     = 2,
  parameter int BF_C     = 2,
  parameter int MATCH    = DEF_MATCH,
  parameter int MISMATCH = DEF_MISMATCH
) (
  input  logic                   clk,
  input  logic                   rst,
  input  score_t                 gap_d,
  input  char_t  [BF_C-1:0]      nq,
  input  char_t  [BF_R-1:0]      ns_in,
  input  logic   [BF_R-1:0]      ns_valid_in,
  input  score_t [BF_R-1:0]      h_left_in,
  input  score_t                 h_diag_in,
  input  score_t                 max_in,
  output score_t [BF_R-1:0][BF_C-1:0] h_out,
  output char_t  [BF_R-1:0]      ns_out,
  output logic   [BF_R-1:0]      ns_valid_out,
  output score_t                 max_out
);

  score_t diag_q;
  score_t [BF_R-1:0][BF_C-1:0] h_cell;   // raw cell results
  score_t [BF_R-1:0][BF_C-1:0] h_next;   // after masking invalid rows
  score_t tile_max;

  for (genvar r = 0; r < BF_R; r++) begin : g_row
    for (genvar c = 0; c < BF_C; c++) begin : g_col
      score_t d_in, l_in, u_in;
      if (r == 0 && c == 0) begin : g_corner
        assign d_in = diag_q;
        assign l_in = h_left_in[0];
        assign u_in = h_out[BF_R-1][0];
      end else if (r == 0) begin : g_top
        assign d_in = h_out[BF_R-1][c-1];
        assign l_in = h_next[0][c-1];
        assign u_in = h_out[BF_R-1][c];
      end else if (c == 0) begin : g_left
        assign d_in = h_left_in[r-1];
        assign l_in = h_left_in[r];
        assign u_in = h_next[r-1][0];
      end else begin : g_inner
        assign d_in = h_next[r-1][c-1];
        assign l_in = h_next[r][c-1];
        assign u_in = h_next[r-1][c];
      end
      sw_cell_core #(.MATCH(MATCH), .MISMATCH(MISMATCH)) u_cell (
        .nq(nq[c]), .ns(ns_in[r]), .h_diag(d_in), .h_left(l_in), .h_up(u_in),
        .gap_d(gap_d), .h(h_cell[r][c]));
      assign h_next[r][c] = ns_valid_in[r] ? h_cell[r][c] : '0;
    end
  end

  always_comb begin
    tile_max = max_in;
    for (int r = 0; r < BF_R; r++)
      for (int c = 0; c < BF_C; c++)
        tile_max = smax(tile_max, h_out[r][c]);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      diag_q       <= '0;
      h_out        <= '0;
      ns_out       <= '0;
      ns_valid_out <= '0;
      max_out      <= '0;
    end else begin
      diag_q       <= h_diag_in;
      h_out        <= h_next;
      ns_out       <= ns_in;
      ns_valid_out <= ns_valid_in;
      max_out      <= smax(tile_max, max_out);
    end
  end

  // rule of the chunk interface: valid rows form a prefix starting at row 0
  a_valid_prefix: assert property (@(posedge clk) disable iff (rst)
    (ns_valid_in & (ns_valid_in + 1'b1)) == '0)
    else $error("rve_block: valid database rows must come first in a chunk");

endmodule
