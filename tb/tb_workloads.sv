// tb_workloads: the array sizes and blocking factors of the published
// comparison, each aligning random and query-derived database sequences
// against its full-length query and checked against the reference.
//   linear RVE 2x2: 2, 5 and 100 blocks (4-, 10- and 200-character query)
//   linear systolic (1x1): 4, 10 and 200 cells
//   36-character query with blocking factors 1x1, 2x1, 3x1, 4x1 (36
//   blocks), 2x2, 3x2, 4x2 (18 blocks), 3x3, 4x3 (12 blocks), 4x4 (9)
// Each configuration also checks the one-cycle-per-block latency and that
// a new chunk is accepted every cycle.
module tb_workloads;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  localparam int NC = 16;
  logic [NC-1:0] d;
  int c [NC], f [NC];

  // comparison of linear systolic and linear RVE arrays
  rve_array_check #(.N(2),   .BR(2), .BC(2), .LA(11), .LB(8),   .LC(15))  w0  (.clk(clk), .done(d[0]),  .checks(c[0]),  .failures(f[0]));
  rve_array_check #(.N(5),   .BR(2), .BC(2), .LA(23), .LB(20),  .LC(31))  w1  (.clk(clk), .done(d[1]),  .checks(c[1]),  .failures(f[1]));
  rve_array_check #(.N(100), .BR(2), .BC(2), .LA(61), .LB(230), .LC(97))  w2  (.clk(clk), .done(d[2]),  .checks(c[2]),  .failures(f[2]));
  rve_array_check #(.N(4),   .BR(1), .BC(1), .LA(11), .LB(8),   .LC(15))  w3  (.clk(clk), .done(d[3]),  .checks(c[3]),  .failures(f[3]));
  rve_array_check #(.N(10),  .BR(1), .BC(1), .LA(23), .LB(20),  .LC(31))  w4  (.clk(clk), .done(d[4]),  .checks(c[4]),  .failures(f[4]));
  rve_array_check #(.N(200), .BR(1), .BC(1), .LA(61), .LB(230), .LC(97))  w5  (.clk(clk), .done(d[5]),  .checks(c[5]),  .failures(f[5]));
  // 36-character query, blocking factor sweep
  rve_array_check #(.N(36), .BR(1), .BC(1), .LA(40), .LB(45), .LC(50)) w6  (.clk(clk), .done(d[6]),  .checks(c[6]),  .failures(f[6]));
  rve_array_check #(.N(36), .BR(2), .BC(1), .LA(40), .LB(45), .LC(50)) w7  (.clk(clk), .done(d[7]),  .checks(c[7]),  .failures(f[7]));
  rve_array_check #(.N(36), .BR(3), .BC(1), .LA(40), .LB(45), .LC(50)) w8  (.clk(clk), .done(d[8]),  .checks(c[8]),  .failures(f[8]));
  rve_array_check #(.N(36), .BR(4), .BC(1), .LA(40), .LB(45), .LC(50)) w9  (.clk(clk), .done(d[9]),  .checks(c[9]),  .failures(f[9]));
  rve_array_check #(.N(18), .BR(2), .BC(2), .LA(40), .LB(45), .LC(50)) w10 (.clk(clk), .done(d[10]), .checks(c[10]), .failures(f[10]));
  rve_array_check #(.N(18), .BR(3), .BC(2), .LA(40), .LB(45), .LC(50)) w11 (.clk(clk), .done(d[11]), .checks(c[11]), .failures(f[11]));
  rve_array_check #(.N(18), .BR(4), .BC(2), .LA(40), .LB(45), .LC(50)) w12 (.clk(clk), .done(d[12]), .checks(c[12]), .failures(f[12]));
  rve_array_check #(.N(12), .BR(3), .BC(3), .LA(40), .LB(45), .LC(50)) w13 (.clk(clk), .done(d[13]), .checks(c[13]), .failures(f[13]));
  rve_array_check #(.N(12), .BR(4), .BC(3), .LA(40), .LB(45), .LC(50)) w14 (.clk(clk), .done(d[14]), .checks(c[14]), .failures(f[14]));
  rve_array_check #(.N(9),  .BR(4), .BC(4), .LA(40), .LB(45), .LC(50)) w15 (.clk(clk), .done(d[15]), .checks(c[15]), .failures(f[15]));

  initial begin
    repeat (20000) @(posedge clk);
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
