// mm_array: the linear array of NB processing elements (PE_1 .. PE_NB).
//
// Each PE talks only to its neighbours. A, B and the control word enter at
// PE_1 and move right, one PE per cycle for A and B; the result columns move
// left through C_out/C_in and leave the array at C_out of PE_1. With B fed
// row by row (one row of NB words per NB cycles) and A fed column by column,
// NB cycles behind B, an NB x NB product is finished one cycle after the last
// A word reaches PE_NB; the NB^2 results then leave PE_1 one per cycle in
// column-major order, starting 2 cycles after the first A word of the last
// phase enters PE_1 (see mm_pe for the stage timing). Consecutive products may
// follow each other without a gap.
module mm_array
  import mm_pkg::*;
#(
  parameter int unsigned NB = 12   // block size n/r, number of PEs
) (
  input  logic  clk,
  input  logic  rst,
  input  din_t  a_in,      // upper input port of PE_1 (matrix A, column-major)
  input  din_t  b_in,      // lower input port of PE_1 (matrix B, row-major)
  input  ctrl_t ctrl_in,   // control word for PE_1
  output acc_t  c_out      // C_out of PE_1
);
  din_t  a [NB+1];
  din_t  b [NB+1];
  ctrl_t ct[NB+1];
  acc_t  c [NB+1];

  assign a[0]  = a_in;
  assign b[0]  = b_in;
  assign ct[0] = ctrl_in;
  assign c[NB] = '0;          // nothing to the right of PE_NB
  assign c_out = c[0];

  for (genvar j = 0; j < NB; j++) begin : g_pe
    mm_pe #(.NB(NB)) u_pe (
      .clk      (clk),
      .rst      (rst),
      .a_in     (a[j]),
      .b_in     (b[j]),
      .ctrl_in  (ct[j]),
      .a_out    (a[j+1]),
      .b_out    (b[j+1]),
      .ctrl_out (ct[j+1]),
      .c_in     (c[j+1]),
      .c_out    (c[j])
    );
  end
endmodule
