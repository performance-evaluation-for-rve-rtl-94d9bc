// tb_sw_cell_core: random and corner-case check of one cell's H update
// against max(0, diag + s, left - d, up - d) computed in integers.
module tb_sw_cell_core;
  import sw_pkg::*;

  int checks = 0, failures = 0;
  int n_zero = 0, n_diag = 0, n_left = 0, n_up = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  char_t nq, ns;
  score_t h_diag, h_left, h_up, gap_d, h;

  sw_cell_core u_dut (.nq(nq), .ns(ns), .h_diag(h_diag), .h_left(h_left),
                      .h_up(h_up), .gap_d(gap_d), .h(h));

  function automatic int ref_h(int a, int b, int dg, int l, int u, int d);
    int s, best;
    s = (a == b) ? 2 : -1;
    best = 0;
    if (dg + s > best) best = dg + s;
    if (l - d > best) best = l - d;
    if (u - d > best) best = u - d;
    return best;
  endfunction

  task automatic apply(int a, int b, int dg, int l, int u, int d);
    int exp_h, s;
    nq = char_t'(a); ns = char_t'(b);
    h_diag = score_t'(dg); h_left = score_t'(l); h_up = score_t'(u); gap_d = score_t'(d);
    #1;
    exp_h = ref_h(a, b, dg, l, u, d);
    s = (a == b) ? 2 : -1;
    if (exp_h == 0) n_zero++;
    else if (exp_h == dg + s) n_diag++;
    else if (exp_h == l - d) n_left++;
    else n_up++;
    checks++;
    if (int'(h) != exp_h) begin
      failures++;
      $display("FAIL nq=%0d ns=%0d diag=%0d left=%0d up=%0d d=%0d: h=%0d exp=%0d",
               a, b, dg, l, u, d, h, exp_h);
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    apply(0, 1, 0, 0, 0, 1);        // everything clamps to 0
    apply(2, 2, 0, 0, 0, 1);        // match from zero
    apply(1, 3, 10, 3, 4, 2);       // mismatch on diagonal wins
    apply(1, 3, 1, 20, 4, 2);       // left gap wins
    apply(1, 3, 1, 4, 30, 2);       // up gap wins
    apply(0, 0, 65000, 0, 0, 1);    // large values
    for (int k = 0; k < 5000; k++)
      apply($urandom_range(3), $urandom_range(3), $urandom_range(200),
            $urandom_range(200), $urandom_range(200), $urandom_range(8));
    for (int k = 0; k < 2000; k++)
      apply($urandom_range(3), $urandom_range(3), $urandom_range(30000),
            $urandom_range(30000), $urandom_range(30000), $urandom_range(30000));
    checks++;
    if (n_zero == 0 || n_diag == 0 || n_left == 0 || n_up == 0) begin
      failures++;
      $display("case coverage missing: zero=%0d diag=%0d left=%0d up=%0d",
               n_zero, n_diag, n_left, n_up);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
