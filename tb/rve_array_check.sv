// rve_array_check: runs one rve_array configuration (used by tb_rve_array).
//
// Sequence A, one idle cycle, sequence B (no reset between them), then a
// reset and sequence C. Every tile every block writes is compared with the
// reference H matrix of its own sequence, so the idle cycle must restart
// the recurrence; max_out is checked after each drain (A and B together,
// then C alone). Also checks that a chunk crosses the array in N cycles
// (one per block) and that a sequence of P chunks is finished P+N-1 cycles
// after its first chunk entered.
module rve_array_check
  import sw_pkg::*;
  import sw_ref::*;
#(
  parameter int N    = 4,
  parameter int BR   = 2,
  parameter int BC   = 2,
  parameter int LA   = 21,
  parameter int LB   = 16,
  parameter int LC   = 30,
  parameter int GAP  = 1
) (
  input  logic clk,
  output logic done,
  output int   checks,
  output int   failures
);

  localparam int QL = N * BC;

  logic rst;
  score_t gap_d, max_out;
  char_t [QL-1:0] nq;
  char_t [BR-1:0] ns_in, ns_out;
  logic [BR-1:0] ns_valid_in;
  score_t [N-1:0][BR-1:0][BC-1:0] h_out;
  logic [N-1:0][BR-1:0] ns_valid_out;

  rve_array #(.N_BLOCKS(N), .BF_R(BR), .BF_C(BC)) u_dut (
    .clk(clk), .rst(rst), .gap_d(gap_d), .nq(nq), .ns_in(ns_in),
    .ns_valid_in(ns_valid_in), .h_left_in('0), .h_diag_in('0), .max_in('0),
    .h_out(h_out), .ns_valid_out(ns_valid_out), .ns_out(ns_out), .max_out(max_out));

  int q [], sa [], sb [], sc [];
  mat_t ha, hb, hc;
  int pa, pb;
  int cnt [N];
  int cyc;
  int first_in, first_out, last_out;
  logic phase_c;

  always @(posedge clk) cyc <= cyc + 1;

  // tile monitor
  always @(posedge clk) begin
    #1;
    for (int b = 0; b < N; b++) begin
      if (!rst && ns_valid_out[b][0]) begin
        int p, base;
        if (b == N - 1 && cnt[b] == (phase_c ? 0 : pa)) first_out = cyc;
        if (b == N - 1) last_out = cyc;
        for (int r = 0; r < BR; r++)
          for (int c = 0; c < BC; c++) begin
            int exp_h, row;
            p = cnt[b];
            if (phase_c) begin
              row = p * BR + r;
              exp_h = (row < LC) ? hc[row + 1][b*BC + c + 1] : 0;
            end else if (p < pa) begin
              row = p * BR + r;
              exp_h = (row < LA) ? ha[row + 1][b*BC + c + 1] : 0;
            end else begin
              row = (p - pa) * BR + r;
              exp_h = (row < LB) ? hb[row + 1][b*BC + c + 1] : 0;
            end
            checks++;
            if (int'(h_out[b][r][c]) != exp_h) begin
              failures++;
              $display("[N=%0d %0dx%0d] block %0d chunk %0d H[%0d][%0d]=%0d exp %0d",
                       N, BR, BC, b, p, r, c, h_out[b][r][c], exp_h);
            end
          end
        cnt[b]++;
      end
    end
  end

  task automatic feed(input int s []);
    int p;
    p = (s.size() + BR - 1) / BR;
    for (int k = 0; k < p; k++) begin
      @(negedge clk);
      for (int r = 0; r < BR; r++) begin
        ns_in[r] = (k*BR + r < s.size()) ? char_t'(s[k*BR + r]) : char_t'($urandom);
        ns_valid_in[r] = (k*BR + r < s.size());
      end
      if (k == 0) first_in = cyc;
    end
    @(negedge clk);
    ns_valid_in = '0;
    foreach (ns_in[r]) ns_in[r] = char_t'($urandom);
  endtask

  task automatic drain_and_check_max(input int exp_max, input int p);
    repeat (N + 2) @(negedge clk);
    checks++;
    if (int'(max_out) != exp_max) begin
      failures++; $display("[N=%0d %0dx%0d] max=%0d exp %0d", N, BR, BC, max_out, exp_max);
    end
    // the first chunk is driven in cycle first_in; the edge that ends that
    // cycle loads block 0, and the last block shows it N edges after
    // first_in: one cycle per block
    checks++;
    if (first_out - first_in != N) begin
      failures++; $display("[N=%0d %0dx%0d] latency %0d cycles, exp %0d", N, BR, BC,
                           first_out - first_in, N);
    end
    checks++;
    if (last_out - first_in != p + N - 1) begin
      failures++; $display("[N=%0d %0dx%0d] run took %0d cycles, exp %0d", N, BR, BC,
                           last_out - first_in, p + N - 1);
    end
  endtask

  initial begin
    done = 0; checks = 0; failures = 0; cyc = 0; phase_c = 0;
    first_out = -1; last_out = -1;
    foreach (cnt[b]) cnt[b] = 0;
    rst = 1; gap_d = score_t'(GAP); ns_in = '0; ns_valid_in = '0;
    q = new[QL]; sa = new[LA]; sb = new[LB]; sc = new[LC];
    foreach (q[j]) q[j] = $urandom_range(3);
    // B repeats a stretch of the query so that long local alignments occur
    foreach (sa[i]) sa[i] = $urandom_range(3);
    foreach (sb[i]) sb[i] = (i < QL && i % 7 != 3) ? q[(i + 1) % QL] : $urandom_range(3);
    foreach (sc[i]) sc[i] = (i % 5 == 0) ? $urandom_range(3) : q[(i + 2) % QL];
    for (int j = 0; j < QL; j++) nq[j] = char_t'(q[j]);
    ha = sw_matrix(sa, q, GAP, 2, -1);
    hb = sw_matrix(sb, q, GAP, 2, -1);
    hc = sw_matrix(sc, q, GAP, 2, -1);
    pa = (LA + BR - 1) / BR;
    pb = (LB + BR - 1) / BR;
    @(negedge clk); @(negedge clk);
    rst = 0;
    feed(sa);          // leaves one idle cycle after A
    feed(sb);
    drain_and_check_max((mat_max(ha) > mat_max(hb)) ? mat_max(ha) : mat_max(hb), pb);
    // reset, then an independent sequence
    rst = 1; phase_c = 1;
    foreach (cnt[b]) cnt[b] = 0;
    @(negedge clk);
    rst = 0; first_out = -1;
    feed(sc);
    drain_and_check_max(mat_max(hc), (LC + BR - 1) / BR);
    for (int b = 0; b < N; b++) begin
      checks++;
      if (cnt[b] != (LC + BR - 1) / BR) begin
        failures++; $display("[N=%0d %0dx%0d] block %0d wrote %0d tiles", N, BR, BC, b, cnt[b]);
      end
    end
    done = 1;
  end

endmodule
