// mm_lmem: a PE's local memory (Cbuf or CObuf) of DEPTH words.
//
// Modelled on a dual-port distributed RAM: one synchronous write port and one
// asynchronous read port, so a word written at a clock edge can be read in the
// very next cycle. The PE uses it as the n-word Cbuf holding column j of C
// during accumulation, and as the n-word CObuf through which the columns of
// the PEs to the right are moved out. The asynchronous read is this design's
// choice; it is what keeps the read-after-write distance of the accumulation
// loop safe for every block size. Contents are not reset.
module mm_lmem #(
  parameter int unsigned DEPTH = 12,
  parameter int unsigned W     = 16,
  localparam int unsigned AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [W-1:0]  wdata,
  input  logic [AW-1:0] raddr,
  output logic [W-1:0]  rdata
);
  logic [W-1:0] mem [DEPTH];

  always_ff @(posedge clk)
    if (we) mem[waddr] <= wdata;

  assign rdata = mem[raddr];
endmodule
