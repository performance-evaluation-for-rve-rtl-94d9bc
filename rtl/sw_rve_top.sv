// sw_rve_top: Smith-Waterman local-alignment accelerator built from a linear
// array of RVE blocks.
//
// Parts: query_mem holds the query (QLEN = N_BLOCKS*BF_C characters, each
// block keeps BF_C of them fixed); db_mem holds the database sequence and
// delivers BF_R characters per cycle; rve_array computes the H matrix one
// BF_R x BF_C tile per block per cycle; hout_mem stores every H value,
// one bank per block, for the host to read back; a small run controller
// sequences a run. The host side (loading, start, result read) is brought
// out as plain ports.
//
// Use: write the query with q_we/q_addr/q_data and the database with
// db_we/db_addr/db_data; pulse start with db_len (1..DB_MAX characters) and
// gap_d valid. The controller then
//   CLEAR  resets the array and the result-memory write pointers (1 cycle),
//   RUN    reads one database chunk per cycle, ceil(db_len/BF_R) cycles,
//   DRAIN  waits N_BLOCKS+1 cycles until the last chunk has left the array
//          and the running maximum has reached the last block,
// and returns to idle with done high. max_score (the best local alignment
// score) and every H(row,col), read through h_rd_row/h_rd_col with one
// cycle latency, are then valid until the next start. run_cycles counts
// the cycles from start to done: ceil(db_len/BF_R) + N_BLOCKS + 3.
// start is ignored while busy; a db_len above DB_MAX is clamped to DB_MAX.
// The run controller, the host ports and the memory layouts are this
// design's own; the memories, the array and their connections follow the
// source design's system diagram.
module sw_rve_top
  import sw_pkg::*;
#(
  parameter int N_BLOCKS = 18,
  parameter int BF_R     = 2,
  parameter int BF_C     = 2,
  parameter int DB_MAX   = 256,
  parameter int MATCH    = DEF_MATCH,
  parameter int MISMATCH = DEF_MISMATCH,
  localparam int QLEN    = N_BLOCKS * BF_C,
  localparam int ROWS    = DB_MAX / BF_R,
  localparam int QAW     = (QLEN > 1) ? $clog2(QLEN) : 1,
  localparam int DAW     = $clog2(DB_MAX),
  localparam int LW      = $clog2(DB_MAX + 1),
  localparam int RAW     = (ROWS > 1) ? $clog2(ROWS) : 1
) (
  input  logic            clk,
  input  logic            rst,
  // query load
  input  logic            q_we,
  input  logic [QAW-1:0]  q_addr,
  input  char_t           q_data,
  // database load
  input  logic            db_we,
  input  logic [DAW-1:0]  db_addr,
  input  char_t           db_data,
  // run control
  input  logic            start,
  input  logic [LW-1:0]   db_len,
  input  score_t          gap_d,
  output logic            busy,
  output logic            done,
  output score_t          max_score,
  output logic [31:0]     run_cycles,
  // result read
  input  logic [DAW-1:0]  h_rd_row,
  input  logic [QAW-1:0]  h_rd_col,
  output score_t          h_rd_data
);

  run_state_t        state;
  logic [LW-1:0]     len_q;
  score_t            d_q;
  logic [RAW:0]      chunk, n_chunks;
  logic [RAW-1:0]    issue_chunk;
  logic              issue_q;
  logic [$clog2(N_BLOCKS+2)-1:0] drain_cnt;
  logic              array_rst;

  char_t  [QLEN-1:0]           nq;
  char_t  [BF_R-1:0]           ns_chunk, ns_last;
  logic   [BF_R-1:0]           ns_valid;
  score_t [N_BLOCKS-1:0][BF_R-1:0][BF_C-1:0] h_tiles;
  logic   [N_BLOCKS-1:0][BF_R-1:0] tile_valid;
  logic   [N_BLOCKS-1:0]       h_we;
  logic   [N_BLOCKS-1:0][RAW-1:0] h_wptr;

  assign n_chunks  = (RAW+1)'((32'(len_q) + BF_R - 1) / BF_R);
  assign array_rst = rst || (state == ST_CLEAR);
  assign busy      = (state != ST_IDLE);

  // ---------------- run controller ----------------
  always_ff @(posedge clk) begin
    if (rst) begin
      state      <= ST_IDLE;
      len_q      <= '0;
      d_q        <= '0;
      chunk      <= '0;
      issue_q    <= 1'b0;
      drain_cnt  <= '0;
      done       <= 1'b0;
      run_cycles <= '0;
    end else begin
      issue_q <= 1'b0;
      if (busy) run_cycles <= run_cycles + 32'd1;
      unique case (state)
        ST_IDLE: if (start) begin
          len_q      <= (32'(db_len) > DB_MAX) ? LW'(DB_MAX) : db_len;
          d_q        <= gap_d;
          done       <= 1'b0;
          run_cycles <= 32'd1;
          state      <= ST_CLEAR;
        end
        ST_CLEAR: begin
          chunk     <= '0;
          drain_cnt <= '0;
          state     <= (len_q == '0) ? ST_DRAIN : ST_RUN;
        end
        ST_RUN: begin
          issue_q <= 1'b1;
          chunk   <= chunk + 1'b1;
          if (chunk + 1'b1 >= n_chunks) state <= ST_DRAIN;
        end
        ST_DRAIN: begin
          drain_cnt <= drain_cnt + 1'b1;
          if (32'(drain_cnt) == N_BLOCKS) begin
            state <= ST_IDLE;
            done  <= 1'b1;
          end
        end
        default: state <= ST_IDLE;
      endcase
    end
  end

  // chunk index of the read issued last cycle, to form the row-valid bits
  always_ff @(posedge clk) issue_chunk <= chunk[RAW-1:0];

  always_comb begin
    for (int l = 0; l < BF_R; l++)
      ns_valid[l] = issue_q && (32'(issue_chunk) * BF_R + l < 32'(len_q));
  end

  // ---------------- memories and array ----------------
  query_mem #(.DEPTH(QLEN)) u_qmem (
    .clk(clk), .we(q_we), .waddr(q_addr), .wdata(q_data), .q(nq));

  db_mem #(.DEPTH(DB_MAX), .LANES(BF_R)) u_dbmem (
    .clk(clk), .we(db_we), .waddr(db_addr), .wdata(db_data),
    .raddr(chunk[RAW-1:0]), .rdata(ns_chunk));

  rve_array #(.N_BLOCKS(N_BLOCKS), .BF_R(BF_R), .BF_C(BF_C),
              .MATCH(MATCH), .MISMATCH(MISMATCH)) u_array (
    .clk(clk), .rst(array_rst), .gap_d(d_q), .nq(nq),
    .ns_in(ns_chunk), .ns_valid_in(ns_valid),
    .h_left_in('0), .h_diag_in('0), .max_in('0),
    .h_out(h_tiles), .ns_valid_out(tile_valid),
    .ns_out(ns_last), .max_out(max_score));

  for (genvar b = 0; b < N_BLOCKS; b++) begin : g_wr
    assign h_we[b] = tile_valid[b][0];
    always_ff @(posedge clk) begin
      if (array_rst)   h_wptr[b] <= '0;
      else if (h_we[b]) h_wptr[b] <= h_wptr[b] + 1'b1;
    end
  end

  hout_mem #(.N_BANKS(N_BLOCKS), .BF_R(BF_R), .BF_C(BF_C), .DEPTH(ROWS)) u_hmem (
    .clk(clk), .we(h_we), .waddr(h_wptr), .wdata(h_tiles),
    .rd_row(h_rd_row), .rd_col(h_rd_col), .rd_data(h_rd_data));

  // the database chunk that leaves the last block is not needed further
  logic unused_ok;
  assign unused_ok = ^ns_last;

endmodule
