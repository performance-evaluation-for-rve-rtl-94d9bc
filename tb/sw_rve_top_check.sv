// sw_rve_top_check: runs sw_rve_top with a given array size and blocking
// factor through its host ports (used by tb_sw_rve_top_configs). Each run
// loads a query and a database, waits for done, checks max_score and
// run_cycles = ceil(len/BR) + N + 3, and reads back and checks every H value.
module sw_rve_top_check
  import sw_pkg::*;
  import sw_ref::*;
#(
  parameter int N   = 4,
  parameter int BR  = 2,
  parameter int BC  = 2,
  parameter int DBM = 64
) (
  input  logic clk,
  output logic fin,
  output int   checks,
  output int   failures
);

  localparam int QL  = N * BC;
  localparam int QAW = (QL > 1) ? $clog2(QL) : 1;
  localparam int DAW = $clog2(DBM);
  localparam int LW  = $clog2(DBM + 1);

  int n_partial = 0, n_full = 0, n_clear = 0, n_zero = 0, n_diag = 0, n_gap = 0;

  logic rst, q_we, db_we, start, busy, done;
  logic [QAW-1:0] q_addr, h_rd_col;
  logic [DAW-1:0] db_addr, h_rd_row;
  char_t q_data, db_data;
  logic [LW-1:0] db_len;
  score_t gap_d, max_score, h_rd_data;
  logic [31:0] run_cycles;

  sw_rve_top #(.N_BLOCKS(N), .BF_R(BR), .BF_C(BC), .DB_MAX(DBM)) u_dut (
    .clk(clk), .rst(rst),
    .q_we(q_we), .q_addr(q_addr), .q_data(q_data),
    .db_we(db_we), .db_addr(db_addr), .db_data(db_data),
    .start(start), .db_len(db_len), .gap_d(gap_d),
    .busy(busy), .done(done), .max_score(max_score), .run_cycles(run_cycles),
    .h_rd_row(h_rd_row), .h_rd_col(h_rd_col), .h_rd_data(h_rd_data));

  int prev_max = -1;

  task automatic run(input int len, input int d, input int mode);
    int q [], s [];
    mat_t h;
    int exp_max, waited, sc;
    q = new[QL]; s = new[len];
    foreach (q[j]) q[j] = $urandom_range(3);
    // mode 0: random database; mode 1: database holds pieces of the query
    foreach (s[i]) s[i] = (mode == 1 && (i / 40) % 2 == 0 && i % 9 != 4) ? q[(i + 3) % QL] : $urandom_range(3);
    h = sw_matrix(s, q, d, 2, -1);
    exp_max = mat_max(h);
    for (int i = 1; i <= len; i++)
      for (int j = 1; j <= QL; j++) begin
        sc = (s[i-1] == q[j-1]) ? 2 : -1;
        if (h[i][j] == 0) n_zero++;
        else if (h[i][j] == h[i-1][j-1] + sc) n_diag++;
        else n_gap++;
      end
    // load
    for (int j = 0; j < QL; j++) begin
      @(negedge clk); q_we = 1; q_addr = QAW'(j); q_data = char_t'(q[j]);
    end
    @(negedge clk); q_we = 0;
    for (int i = 0; i < len; i++) begin
      @(negedge clk); db_we = 1; db_addr = DAW'(i); db_data = char_t'(s[i]);
    end
    @(negedge clk); db_we = 0;
    // start
    @(negedge clk); start = 1; db_len = LW'(len); gap_d = score_t'(d);
    @(negedge clk); start = 0; db_len = '0; gap_d = '0;
    waited = 1;
    while (!done) begin @(negedge clk); waited++; end
    checks++;
    if (int'(run_cycles) != (len + BR - 1) / BR + N + 3) begin
      failures++; $display("len %0d: run_cycles=%0d exp %0d", len, run_cycles, (len + BR - 1) / BR + N + 3);
    end
    checks++;
    if (int'(max_score) != exp_max) begin
      failures++; $display("len %0d: max_score=%0d exp %0d", len, max_score, exp_max);
    end
    if (len % BR != 0) n_partial++;
    if (len == DBM) n_full++;
    if (prev_max > exp_max) n_clear++;
    prev_max = exp_max;
    // read back the whole H matrix
    for (int i = 0; i < len; i++)
      for (int j = 0; j < QL; j++) begin
        @(negedge clk); h_rd_row = DAW'(i); h_rd_col = QAW'(j);
        @(negedge clk);
        checks++;
        if (int'(h_rd_data) != h[i+1][j+1]) begin
          failures++;
          if (failures < 20) $display("len %0d: H(%0d,%0d)=%0d exp %0d", len, i, j, h_rd_data, h[i+1][j+1]);
        end
      end
    checks++;
    if (!done || busy) begin
      failures++; $display("done/busy wrong after readback");
    end
  endtask

  initial begin
    fin = 0; checks = 0; failures = 0;
    rst = 1; q_we = 0; db_we = 0; start = 0; q_addr = 0; q_data = 0;
    db_addr = 0; db_data = 0; db_len = 0; gap_d = 0; h_rd_row = 0; h_rd_col = 0;
    repeat (3) @(negedge clk);
    rst = 0;
    run(DBM - 1, 1, 1);
    run(DBM, 2, 1);
    run(1, 1, 0);
    run(BR + 1, 1, 0);
    checks += 4;
    if (BR > 1 && n_partial == 0) begin failures++; $display("[N=%0d %0dx%0d] no half-filled chunk", N, BR, BC); end
    if (n_full == 0)    begin failures++; $display("[N=%0d %0dx%0d] no full-store run", N, BR, BC); end
    if (n_clear == 0)   begin failures++; $display("[N=%0d %0dx%0d] no run showing the clear", N, BR, BC); end
    if (n_zero == 0 || n_diag == 0 || n_gap == 0) begin
      failures++; $display("[N=%0d %0dx%0d] a cell case never occurred", N, BR, BC);
    end
    fin = 1;
  end

endmodule
