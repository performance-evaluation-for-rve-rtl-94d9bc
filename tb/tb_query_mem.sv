// tb_query_mem: writes every entry of the query store in random order and
// checks that all entries are visible in parallel, then rewrites some.
// A second, 8-entry store shares the writes to addresses 0..7.
module tb_query_mem;
  import sw_pkg::*;

  localparam int DEPTH = 36;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic we;
  logic [5:0] waddr;
  char_t wdata;
  char_t [DEPTH-1:0] q;
  char_t model [DEPTH];

  query_mem u_dut (.clk(clk), .we(we), .waddr(waddr), .wdata(wdata), .q(q));

  // a power-of-two depth, where the address range is fully used
  char_t [7:0] q8;
  query_mem #(.DEPTH(8)) u_d8 (.clk(clk), .we(we && waddr < 8), .waddr(waddr[2:0]),
                               .wdata(wdata), .q(q8));

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_all();
    for (int k = 0; k < 8; k++) begin
      checks++;
      if (q8[k] != model[k]) begin
        failures++; $display("depth-8 entry %0d: %0d exp %0d", k, q8[k], model[k]);
      end
    end
    for (int k = 0; k < DEPTH; k++) begin
      checks++;
      if (q[k] != model[k]) begin
        failures++; $display("entry %0d: %0d exp %0d", k, q[k], model[k]);
      end
    end
  endtask

  initial begin
    we = 0; waddr = 0; wdata = 0;
    for (int k = 0; k < DEPTH; k++) begin
      @(negedge clk);
      we = 1; waddr = 6'(DEPTH - 1 - k); wdata = char_t'($urandom);
      model[DEPTH - 1 - k] = wdata;
    end
    @(negedge clk); we = 0;
    check_all();
    for (int r = 0; r < 50; r++) begin
      @(negedge clk);
      we = 1; waddr = 6'($urandom_range(DEPTH - 1)); wdata = char_t'($urandom);
      model[waddr] = wdata;
      @(negedge clk); we = 0;
      check_all();
    end
    // write to an address beyond the store must change nothing
    @(negedge clk); we = 1; waddr = 6'd63; wdata = 2'd3;
    @(negedge clk); we = 0;
    check_all();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
