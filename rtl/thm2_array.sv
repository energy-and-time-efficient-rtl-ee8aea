// thm2_array: linear array of NB Theorem 2 PEs (R^2 MACs each).
//
// R A streams, R B streams and the control word enter at PE_1 and move right
// one PE per cycle; the R result streams move left and leave at PE_1. See
// thm2_pe for the block arrangement and the order of the results.
module thm2_array
  import mm_pkg::*;
#(
  parameter int unsigned NB = 4,
  parameter int unsigned R  = 4
) (
  input  logic  clk,
  input  logic  rst,
  input  din_t  a_in [R],
  input  din_t  b_in [R],
  input  ctrl_t ctrl_in,
  output acc_t  c_out [R]
);
  din_t  a  [NB+1][R];
  din_t  b  [NB+1][R];
  ctrl_t ct [NB+1];
  acc_t  c  [NB+1][R];

  assign a[0]  = a_in;
  assign b[0]  = b_in;
  assign ct[0] = ctrl_in;
  assign c[NB] = '{default: '0};
  assign c_out = c[0];

  for (genvar j = 0; j < NB; j++) begin : g_pe
    thm2_pe #(.NB(NB), .R(R)) u_pe (
      .clk, .rst,
      .a_in (a[j]), .b_in (b[j]), .ctrl_in (ct[j]),
      .a_out (a[j+1]), .b_out (b[j+1]), .ctrl_out (ct[j+1]),
      .c_in (c[j+1]), .c_out (c[j])
    );
  end
endmodule
