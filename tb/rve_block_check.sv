// rve_block_check: stimulus and integer reference model for one rve_block
// of blocking factor BR x BC (used by tb_rve_block).
module rve_block_check
  import sw_pkg::*;
#(
  parameter int BR   = 2,
  parameter int BC   = 2,
  parameter int NCYC = 400
) (
  input  logic clk,
  output logic done,
  output int   checks,
  output int   failures
);

  logic rst;
  score_t gap_d, h_diag_in, max_in, max_out;
  char_t [BC-1:0] nq;
  char_t [BR-1:0] ns_in, ns_out;
  logic [BR-1:0] ns_valid_in, ns_valid_out;
  score_t [BR-1:0] h_left_in;
  score_t [BR-1:0][BC-1:0] h_out;

  rve_block #(.BF_R(BR), .BF_C(BC)) u_dut (
    .clk(clk), .rst(rst), .gap_d(gap_d), .nq(nq), .ns_in(ns_in),
    .ns_valid_in(ns_valid_in), .h_left_in(h_left_in), .h_diag_in(h_diag_in),
    .max_in(max_in), .h_out(h_out), .ns_out(ns_out), .ns_valid_out(ns_valid_out),
    .max_out(max_out));

  int m_out [BR][BC];
  int m_diag, m_max;
  int m_ns [BR];
  int m_nv [BR];

  task automatic model_reset();
    foreach (m_out[r, c]) m_out[r][c] = 0;
    m_diag = 0; m_max = 0;
    foreach (m_ns[r]) begin m_ns[r] = 0; m_nv[r] = 0; end
  endtask

  // one clock edge of the model, from the inputs present before the edge
  task automatic model_step();
    int g [BR+1][BC+1];
    int s, best, mx;
    mx = m_max;
    if (int'(max_in) > mx) mx = int'(max_in);
    foreach (m_out[r, c]) if (m_out[r][c] > mx) mx = m_out[r][c];
    g[0][0] = m_diag;
    for (int c = 0; c < BC; c++) g[0][c+1] = m_out[BR-1][c];
    for (int r = 0; r < BR; r++) g[r+1][0] = int'(h_left_in[r]);
    for (int r = 0; r < BR; r++)
      for (int c = 0; c < BC; c++) begin
        s = (nq[c] == ns_in[r]) ? 2 : -1;
        best = 0;
        if (g[r][c] + s > best) best = g[r][c] + s;
        if (g[r+1][c] - int'(gap_d) > best) best = g[r+1][c] - int'(gap_d);
        if (g[r][c+1] - int'(gap_d) > best) best = g[r][c+1] - int'(gap_d);
        g[r+1][c+1] = ns_valid_in[r] ? best : 0;
      end
    for (int r = 0; r < BR; r++) begin
      for (int c = 0; c < BC; c++) m_out[r][c] = g[r+1][c+1];
      m_ns[r] = int'(ns_in[r]);
      m_nv[r] = int'(ns_valid_in[r]);
    end
    m_diag = int'(h_diag_in);
    m_max = mx;
  endtask

  task automatic compare(int cyc);
    for (int r = 0; r < BR; r++) begin
      for (int c = 0; c < BC; c++) begin
        checks++;
        if (int'(h_out[r][c]) != m_out[r][c]) begin
          failures++;
          $display("[%0dx%0d] cycle %0d H[%0d][%0d]=%0d exp %0d", BR, BC, cyc, r, c, h_out[r][c], m_out[r][c]);
        end
      end
      checks++;
      if (int'(ns_out[r]) != m_ns[r] || int'(ns_valid_out[r]) != m_nv[r]) begin
        failures++; $display("[%0dx%0d] cycle %0d Ns_out row %0d wrong", BR, BC, cyc, r);
      end
    end
    checks++;
    if (int'(max_out) != m_max) begin
      failures++; $display("[%0dx%0d] cycle %0d max=%0d exp %0d", BR, BC, cyc, max_out, m_max);
    end
  endtask

  initial begin
    int nvalid;
    done = 0; checks = 0; failures = 0;
    rst = 1; gap_d = 1; h_diag_in = 0; max_in = 0; nq = '0; ns_in = '0;
    ns_valid_in = '0; h_left_in = '0;
    @(negedge clk); @(negedge clk);
    rst = 0;
    model_reset();
    for (int k = 0; k < NCYC; k++) begin
      // new query characters now and then; mostly a small alphabet range
      if (k % 50 == 0)
        for (int c = 0; c < BC; c++) nq[c] = char_t'($urandom);
      if (k % 100 == 0) gap_d = score_t'($urandom_range(1, 4));
      for (int r = 0; r < BR; r++) begin
        ns_in[r] = char_t'($urandom);
        h_left_in[r] = score_t'($urandom_range(0, 300));
      end
      h_diag_in = score_t'($urandom_range(0, 300));
      max_in = score_t'($urandom_range(0, 400));
      // mostly all rows valid, sometimes a valid prefix or a bubble
      nvalid = ($urandom_range(9) < 7) ? BR : $urandom_range(BR);
      for (int r = 0; r < BR; r++) ns_valid_in[r] = (r < nvalid);
      if (k == NCYC / 2) rst = 1;
      @(posedge clk);
      if (rst) model_reset(); else model_step();
      #1;
      compare(k);
      @(negedge clk);
      rst = 0;
    end
    done = 1;
  end

endmodule
