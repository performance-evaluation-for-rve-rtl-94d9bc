// tb_hout_mem: writes random tiles into random banks and rows, then reads
// every H(row,col) back through the single read port and compares with a
// model of the matrix; checks the one-cycle read latency.
module tb_hout_mem;
  import sw_pkg::*;

  localparam int NB = 4, BR = 2, BC = 3, DEPTH = 8;
  localparam int ROWS = DEPTH * BR, COLS = NB * BC;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [NB-1:0] we;
  logic [NB-1:0][2:0] waddr;
  score_t [NB-1:0][BR-1:0][BC-1:0] wdata;
  logic [3:0] rd_row;
  logic [3:0] rd_col;
  score_t rd_data;
  score_t model [ROWS][COLS];

  hout_mem #(.N_BANKS(NB), .BF_R(BR), .BF_C(BC), .DEPTH(DEPTH)) u_dut (
    .clk(clk), .we(we), .waddr(waddr), .wdata(wdata),
    .rd_row(rd_row), .rd_col(rd_col), .rd_data(rd_data));

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = '0; waddr = '0; wdata = '0; rd_row = 0; rd_col = 0;
    // fill every row of every bank, all banks written together
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk);
      we = '1;
      for (int b = 0; b < NB; b++) begin
        waddr[b] = 3'(a);
        for (int r = 0; r < BR; r++)
          for (int c = 0; c < BC; c++) begin
            wdata[b][r][c] = score_t'($urandom);
            model[a*BR + r][b*BC + c] = wdata[b][r][c];
          end
      end
    end
    // random single-bank overwrites
    for (int k = 0; k < 40; k++) begin
      int b, a;
      @(negedge clk);
      b = $urandom_range(NB - 1); a = $urandom_range(DEPTH - 1);
      // other banks see changing addresses and data with their enables low
      for (int o = 0; o < NB; o++) begin
        waddr[o] = 3'($urandom);
        for (int r = 0; r < BR; r++)
          for (int c = 0; c < BC; c++) wdata[o][r][c] = score_t'($urandom);
      end
      we = '0; we[b] = 1'b1; waddr[b] = 3'(a);
      for (int r = 0; r < BR; r++)
        for (int c = 0; c < BC; c++) begin
          wdata[b][r][c] = score_t'($urandom);
          model[a*BR + r][b*BC + c] = wdata[b][r][c];
        end
    end
    @(negedge clk); we = '0;
    for (int r = 0; r < ROWS; r++)
      for (int c = 0; c < COLS; c++) begin
        @(negedge clk);
        rd_row = 4'(r); rd_col = 4'(c);
        @(posedge clk); #1;
        checks++;
        if (rd_data != model[r][c]) begin
          failures++; $display("H(%0d,%0d)=%0d exp %0d", r, c, rd_data, model[r][c]);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
