// tb_db_mem: fills the database store, then reads every chunk and checks
// that lane l of row r holds character r*LANES + l, one cycle after the
// address. Runs the default two-lane store and a three-lane one.
module tb_db_mem;
  import sw_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  localparam int D2 = 256, D3 = 48;
  logic we;
  logic [7:0] waddr;
  char_t wdata;
  logic [6:0] raddr2;
  logic [3:0] raddr3;
  char_t [1:0] rdata2;
  char_t [2:0] rdata3;
  char_t model [D2];

  db_mem u_d2 (.clk(clk), .we(we), .waddr(waddr), .wdata(wdata), .raddr(raddr2), .rdata(rdata2));
  db_mem #(.DEPTH(D3), .LANES(3)) u_d3 (.clk(clk), .we(we && waddr < D3), .waddr(waddr[5:0]),
                                        .wdata(wdata), .raddr(raddr3), .rdata(rdata3));

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; waddr = 0; wdata = 0; raddr2 = 0; raddr3 = 0;
    for (int k = 0; k < D2; k++) begin
      @(negedge clk);
      we = 1; waddr = 8'(k); wdata = char_t'($urandom); model[k] = wdata;
    end
    @(negedge clk); we = 0;
    for (int r = 0; r < D2 / 2; r++) begin
      raddr2 = 7'(r);
      raddr3 = 4'(r % (D3 / 3));
      @(posedge clk); #1;
      for (int l = 0; l < 2; l++) begin
        checks++;
        if (rdata2[l] != model[r * 2 + l]) begin
          failures++; $display("2-lane row %0d lane %0d: %0d exp %0d", r, l, rdata2[l], model[r*2+l]);
        end
      end
      for (int l = 0; l < 3; l++) begin
        checks++;
        if (rdata3[l] != model[(r % (D3 / 3)) * 3 + l]) begin
          failures++; $display("3-lane row %0d lane %0d mismatch", r % (D3/3), l);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
