// hout_mem: result store for the H matrix (the "BRAM for Data Out").
//
// One bank per RVE block. Bank b receives, through its own write port, the
// BF_R x BF_C tile that block b produced for chunk p at row p, so the
// skewed outputs of the array are all written in the cycle they appear.
// The host reads one H value at a time: H(rd_row, rd_col) is found in bank
// rd_col / BF_C, row rd_row / BF_R, and appears on rd_data one cycle after
// the address (synchronous read). The banking and addressing are this
// design's choices; the source design shows only that every block's
// results go into a block RAM read by the host.
module hout_mem
  import sw_pkg::*;
#(
  parameter int N_BANKS = 18,
  parameter int BF_R    = 2,
  parameter int BF_C    = 2,
  parameter int DEPTH   = 128,
  localparam int AW     = (DEPTH > 1) ? $clog2(DEPTH) : 1,
  localparam int RW     = $clog2(DEPTH * BF_R),
  localparam int CW     = (N_BANKS * BF_C > 1) ? $clog2(N_BANKS * BF_C) : 1
) (
  input  logic                                   clk,
  input  logic   [N_BANKS-1:0]                   we,
  input  logic   [N_BANKS-1:0][AW-1:0]           waddr,
  input  score_t [N_BANKS-1:0][BF_R-1:0][BF_C-1:0] wdata,
  input  logic   [RW-1:0]                        rd_row,
  input  logic   [CW-1:0]                        rd_col,
  output score_t                                 rd_data
);

  typedef score_t [BF_R-1:0][BF_C-1:0] tile_t;

  tile_t [N_BANKS-1:0] bank_q;
  logic  [CW-1:0]      col_q;
  logic  [RW-1:0]      row_q;

  for (genvar b = 0; b < N_BANKS; b++) begin : g_bank
    tile_t mem [DEPTH];
    always_ff @(posedge clk) begin
      if (we[b]) mem[waddr[b]] <= wdata[b];
      bank_q[b] <= mem[AW'(32'(rd_row) / BF_R)];
    end
  end

  always_ff @(posedge clk) begin
    col_q <= rd_col;
    row_q <= rd_row;
  end

  always_comb begin
    int unsigned bk, cc, rr;
    bk = 32'(col_q) / BF_C;
    cc = 32'(col_q) % BF_C;
    rr = 32'(row_q) % BF_R;
    rd_data = '0;
    if (bk < N_BANKS) rd_data = bank_q[bk][rr][cc];
  end

endmodule
