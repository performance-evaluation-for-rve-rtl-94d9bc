// tb_seq_cmp: exhaustive check of the similarity score for every pair of
// characters, with the default scores and with a second score set.
module tb_seq_cmp;
  import sw_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  char_t nq, ns;
  sscore_t s_def, s_alt;

  seq_cmp u_def (.nq(nq), .ns(ns), .s(s_def));
  seq_cmp #(.MATCH(5), .MISMATCH(-3)) u_alt (.nq(nq), .ns(ns), .s(s_alt));

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < 4; a++)
      for (int b = 0; b < 4; b++) begin
        nq = char_t'(a); ns = char_t'(b);
        #1;
        checks += 2;
        if (int'(s_def) != ((a == b) ? 2 : -1)) begin
          failures++; $display("default: nq=%0d ns=%0d s=%0d", a, b, s_def);
        end
        if (int'(s_alt) != ((a == b) ? 5 : -3)) begin
          failures++; $display("alt: nq=%0d ns=%0d s=%0d", a, b, s_alt);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
