// tb_sw_rve_top: end-to-end test of the accelerator at its default size
// (18 blocks of 2x2, 36-character query, 256-character database store).
//
// Each run loads a query and a database through the host ports, starts the
// run, waits for done, checks max_score and the cycle count
// ceil(len/2) + N_BLOCKS + 3, and reads back every H(row,col) of the
// result memory, comparing all of them with the reference matrix. Runs
// cover an odd length (half-filled last chunk), the full store, a
// one-character database and back-to-back runs whose smaller maximum
// shows that each start clears the previous result. Each of these
// mechanisms, and the three ways a cell can take its value (zero clamp,
// diagonal, gap), is counted and must occur at least once.
module tb_sw_rve_top;
  import sw_pkg::*;
  import sw_ref::*;

  localparam int N = 18, QL = 36, DBM = 256;

  int checks = 0, failures = 0;
  int n_partial = 0, n_full = 0, n_clear = 0, n_zero = 0, n_diag = 0, n_gap = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic rst, q_we, db_we, start, busy, done;
  logic [5:0] q_addr, h_rd_col;
  logic [7:0] db_addr, h_rd_row;
  char_t q_data, db_data;
  logic [8:0] db_len;
  score_t gap_d, max_score, h_rd_data;
  logic [31:0] run_cycles;

  sw_rve_top u_dut (
    .clk(clk), .rst(rst),
    .q_we(q_we), .q_addr(q_addr), .q_data(q_data),
    .db_we(db_we), .db_addr(db_addr), .db_data(db_data),
    .start(start), .db_len(db_len), .gap_d(gap_d),
    .busy(busy), .done(done), .max_score(max_score), .run_cycles(run_cycles),
    .h_rd_row(h_rd_row), .h_rd_col(h_rd_col), .h_rd_data(h_rd_data));

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

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
      @(negedge clk); q_we = 1; q_addr = 6'(j); q_data = char_t'(q[j]);
    end
    @(negedge clk); q_we = 0;
    for (int i = 0; i < len; i++) begin
      @(negedge clk); db_we = 1; db_addr = 8'(i); db_data = char_t'(s[i]);
    end
    @(negedge clk); db_we = 0;
    // start
    @(negedge clk); start = 1; db_len = 9'(len); gap_d = score_t'(d);
    @(negedge clk); start = 0; db_len = '0; gap_d = '0;
    waited = 1;
    while (!done) begin @(negedge clk); waited++; end
    checks++;
    if (int'(run_cycles) != (len + 1) / 2 + N + 3) begin
      failures++; $display("len %0d: run_cycles=%0d exp %0d", len, run_cycles, (len + 1) / 2 + N + 3);
    end
    checks++;
    if (int'(max_score) != exp_max) begin
      failures++; $display("len %0d: max_score=%0d exp %0d", len, max_score, exp_max);
    end
    if (len % 2 == 1) n_partial++;
    if (len == DBM) n_full++;
    if (prev_max > exp_max) n_clear++;
    prev_max = exp_max;
    // read back the whole H matrix
    for (int i = 0; i < len; i++)
      for (int j = 0; j < QL; j++) begin
        @(negedge clk); h_rd_row = 8'(i); h_rd_col = 6'(j);
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
    rst = 1; q_we = 0; db_we = 0; start = 0; q_addr = 0; q_data = 0;
    db_addr = 0; db_data = 0; db_len = 0; gap_d = 0; h_rd_row = 0; h_rd_col = 0;
    repeat (3) @(negedge clk);
    rst = 0;
    checks++;
    if (busy || done) begin failures++; $display("busy/done after reset"); end
    run(101, 1, 1);
    run(DBM, 2, 1);
    run(1, 1, 0);
    run(64, 1, 0);
    run(37, 3, 1);
    $display("mechanisms: partial=%0d full=%0d clear=%0d zero=%0d diag=%0d gap=%0d",
             n_partial, n_full, n_clear, n_zero, n_diag, n_gap);
    checks += 6;
    if (n_partial == 0) begin failures++; $display("no half-filled chunk"); end
    if (n_full == 0)    begin failures++; $display("no full-store run"); end
    if (n_clear == 0)   begin failures++; $display("no run showing the clear"); end
    if (n_zero == 0)    begin failures++; $display("no zero clamp"); end
    if (n_diag == 0)    begin failures++; $display("no diagonal step"); end
    if (n_gap == 0)     begin failures++; $display("no gap step"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
