// tb_sw_rve_top_configs: the complete accelerator at blocking factors other
// than the default 2x2: 36 blocks of 2x1, 12 blocks of 3x3 (three database
// lanes), 9 blocks of 4x4 (four lanes, up to three empty rows in the last
// chunk) and 4 single cells (the plain systolic array).
module tb_sw_rve_top_configs;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  localparam int NC = 4;
  logic [NC-1:0] d;
  int c [NC], f [NC];

  sw_rve_top_check #(.N(36), .BR(2), .BC(1), .DBM(64)) t0 (.clk(clk), .fin(d[0]), .checks(c[0]), .failures(f[0]));
  sw_rve_top_check #(.N(12), .BR(3), .BC(3), .DBM(63)) t1 (.clk(clk), .fin(d[1]), .checks(c[1]), .failures(f[1]));
  sw_rve_top_check #(.N(9),  .BR(4), .BC(4), .DBM(64)) t2 (.clk(clk), .fin(d[2]), .checks(c[2]), .failures(f[2]));
  sw_rve_top_check #(.N(4),  .BR(1), .BC(1), .DBM(32)) t3 (.clk(clk), .fin(d[3]), .checks(c[3]), .failures(f[3]));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wait (&d);
    for (int k = 0; k < NC; k++) begin
      checks += c[k];
      failures += f[k];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
