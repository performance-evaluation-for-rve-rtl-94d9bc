// query_mem: query-sequence store (the "BRAM for Nq").
//
// The query characters stay fixed in their blocks for a whole run, so every
// entry must be visible at once: the store is a register file with one
// host write port (we/waddr/wdata, written on the rising clock edge) and
// all DEPTH entries on q in parallel. DEPTH = 36 is the query length the
// evaluated designs align in one run. The register-file form is this
// design's choice; the source design draws it as a block RAM.
module query_mem
  import sw_pkg::*;
#(
  parameter int DEPTH = 36,
  localparam int AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic               clk,
  input  logic               we,
  input  logic [AW-1:0]      waddr,
  input  char_t              wdata,
  output char_t [DEPTH-1:0]  q
);

  always_ff @(posedge clk) begin
    if (we && 32'(waddr) < DEPTH) q[waddr] <= wdata;
  end

endmodule
