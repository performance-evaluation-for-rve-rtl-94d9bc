// rve_array: linear array of N_BLOCKS RVE blocks.
//
// Block b holds query characters nq[b*BF_C +: BF_C]. A chunk of BF_R
// database characters enters block 0 each cycle and moves one block per
// cycle, so block b works on chunk p in cycle p+b and the tiles on one
// anti-diagonal of the H matrix are computed together. Each block passes
// its last H column (h_left/h_diag inputs of the next block), the database
// chunk and its running maximum to its right neighbour. The left edge takes
// h_left_in, h_diag_in and max_in (tie them to 0 for a stand-alone array,
// or, to extend an array, connect the last column and bottom-right value
// of another array's last block, taken from its h_out).
//
// Timing: the tile of chunk p in block b appears on h_out[b] at the end of
// cycle p+b, so a chunk needs N_BLOCKS cycles to cross the array (one cycle
// per block). max_out is final N_BLOCKS+1 cycles after the last valid chunk
// has entered. With BF_R = BF_C = 1 the array is the plain linear systolic
// array of single cells. The chain structure follows the source design.
module rve_array
  import sw_pkg::*;
#(
  parameter int N_BLOCKS = 18,
  parameter int BF_R     = 2,
  parameter int BF_C     = 2,
  parameter int MATCH    = DEF_MATCH,
  parameter int MISMATCH = DEF_MISMATCH
) (
  input  logic                   clk,
  input  logic                   rst,
  input  score_t                 gap_d,
  input  char_t  [N_BLOCKS*BF_C-1:0] nq,
  input  char_t  [BF_R-1:0]      ns_in,
  input  logic   [BF_R-1:0]      ns_valid_in,
  input  score_t [BF_R-1:0]      h_left_in,
  input  score_t                 h_diag_in,
  input  score_t                 max_in,
  output score_t [N_BLOCKS-1:0][BF_R-1:0][BF_C-1:0] h_out,
  output logic   [N_BLOCKS-1:0][BF_R-1:0] ns_valid_out,
  output char_t  [BF_R-1:0]      ns_out,
  output score_t                 max_out
);

  char_t  [N_BLOCKS:0][BF_R-1:0] ns_link;
  logic   [N_BLOCKS:0][BF_R-1:0] nv_link;
  score_t [N_BLOCKS-1:0][BF_R-1:0] hl_link;  // last column of the block to the left
  score_t [N_BLOCKS-1:0]           hd_link;
  score_t [N_BLOCKS:0]           mx_link;

  assign ns_link[0] = ns_in;
  assign nv_link[0] = ns_valid_in;
  assign hl_link[0] = h_left_in;
  assign hd_link[0] = h_diag_in;
  assign mx_link[0] = max_in;

  for (genvar b = 0; b < N_BLOCKS; b++) begin : g_blk
    rve_block #(.BF_R(BF_R), .BF_C(BF_C), .MATCH(MATCH), .MISMATCH(MISMATCH)) u_blk (
      .clk         (clk),
      .rst         (rst),
      .gap_d       (gap_d),
      .nq          (nq[b*BF_C +: BF_C]),
      .ns_in       (ns_link[b]),
      .ns_valid_in (nv_link[b]),
      .h_left_in   (hl_link[b]),
      .h_diag_in   (hd_link[b]),
      .max_in      (mx_link[b]),
      .h_out       (h_out[b]),
      .ns_out      (ns_link[b+1]),
      .ns_valid_out(nv_link[b+1]),
      .max_out     (mx_link[b+1]));
    if (b < N_BLOCKS - 1) begin : g_fwd
      for (genvar r = 0; r < BF_R; r++) begin : g_col
        assign hl_link[b+1][r] = h_out[b][r][BF_C-1];
      end
      assign hd_link[b+1] = h_out[b][BF_R-1][BF_C-1];
    end
    assign ns_valid_out[b] = nv_link[b+1];
  end

  assign ns_out  = ns_link[N_BLOCKS];
  assign max_out = mx_link[N_BLOCKS];

endmodule
