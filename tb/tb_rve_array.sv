// tb_rve_array: end-to-end alignment on linear RVE arrays of several
// blocking factors against the reference H matrix: the default 18-block
// 2x2 array (36-character query), the 2-block 2x2 array, a 4-cell 1x1
// array (the plain linear systolic array), 36 blocks of 2x1, 12 of 4x3 and
// 9 of 4x4.
module tb_rve_array;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  localparam int NC = 6;
  logic [NC-1:0] d;
  int c [NC], f [NC];

  rve_array_check #(.N(18), .BR(2), .BC(2), .LA(41), .LB(40), .LC(57)) u0 (.clk(clk), .done(d[0]), .checks(c[0]), .failures(f[0]));
  rve_array_check #(.N(2),  .BR(2), .BC(2), .LA(9),  .LB(6),  .LC(13)) u1 (.clk(clk), .done(d[1]), .checks(c[1]), .failures(f[1]));
  rve_array_check #(.N(4),  .BR(1), .BC(1), .LA(7),  .LB(5),  .LC(12), .GAP(2)) u2 (.clk(clk), .done(d[2]), .checks(c[2]), .failures(f[2]));
  rve_array_check #(.N(36), .BR(2), .BC(1), .LA(33), .LB(40), .LC(45)) u3 (.clk(clk), .done(d[3]), .checks(c[3]), .failures(f[3]));
  rve_array_check #(.N(12), .BR(4), .BC(3), .LA(30), .LB(37), .LC(50)) u4 (.clk(clk), .done(d[4]), .checks(c[4]), .failures(f[4]));
  rve_array_check #(.N(9),  .BR(4), .BC(4), .LA(26), .LB(36), .LC(39)) u5 (.clk(clk), .done(d[5]), .checks(c[5]), .failures(f[5]));

  initial begin
    repeat (5000) @(posedge clk);
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
