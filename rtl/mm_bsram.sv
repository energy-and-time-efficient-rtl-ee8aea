// mm_bsram: on-chip block memory for a matrix (a Block SelectRAM stand-in).
//
// Simple dual-port RAM of DEPTH words of W bits: one synchronous write port
// and one synchronous read port (read data in the cycle after the address).
// The on-chip design keeps A, B and C in such memories; the port arrangement
// and the one-cycle read latency are this design's choices.
module mm_bsram #(
  parameter int unsigned DEPTH = 2304,
  parameter int unsigned W     = 16,
  localparam int unsigned AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [W-1:0]  wdata,
  input  logic          re,
  input  logic [AW-1:0] raddr,
  output logic [W-1:0]  rdata
);
  logic [W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    if (re) rdata <= mem[raddr];
  end
endmodule
