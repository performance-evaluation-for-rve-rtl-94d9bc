// tb_rve_block: drives one RVE block with random tile inputs every cycle and
// compares its registered outputs with an integer model of the tile
// recurrence, including the buffered corner, the fed-back last row, masked
// invalid rows, the running maximum and the one-cycle latency. Runs the
// 2x2 block and a 3x2 block, with a reset in the middle.
module tb_rve_block;
  import sw_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic d2, d3;
  int c2, f2, c3, f3;
  rve_block_check #(.BR(2), .BC(2), .NCYC(400)) u_c22 (.clk(clk), .done(d2), .checks(c2), .failures(f2));
  rve_block_check #(.BR(3), .BC(2), .NCYC(400)) u_c32 (.clk(clk), .done(d3), .checks(c3), .failures(f3));

  initial begin
    wait (d2 && d3);
    checks = c2 + c3;
    failures = f2 + f3;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
