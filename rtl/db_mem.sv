// db_mem: database-sequence store (the "BRAM for Ns").
//
// Holds up to DEPTH characters. Character k sits in lane k % LANES at row
// k / LANES, so one read returns a whole chunk of LANES consecutive
// characters, which is what the first RVE block consumes per cycle. The
// host writes one character per cycle (we/waddr/wdata). The read is
// synchronous like a block RAM: rdata shows row raddr one cycle after it is
// presented. DEPTH must be a multiple of LANES. Depth and lane layout are
// this design's choices.
module db_mem
  import sw_pkg::*;
#(
  parameter int DEPTH = 256,
  parameter int LANES = 2,
  localparam int ROWS = DEPTH / LANES,
  localparam int AW   = $clog2(DEPTH),
  localparam int RAW  = (ROWS > 1) ? $clog2(ROWS) : 1
) (
  input  logic               clk,
  input  logic               we,
  input  logic [AW-1:0]      waddr,
  input  char_t              wdata,
  input  logic [RAW-1:0]     raddr,
  output char_t [LANES-1:0]  rdata
);

  for (genvar l = 0; l < LANES; l++) begin : g_lane
    char_t mem [ROWS];
    always_ff @(posedge clk) begin
      if (we && (32'(waddr) % LANES) == l) mem[32'(waddr) / LANES] <= wdata;
      rdata[l] <= mem[raddr];
    end
  end

endmodule
