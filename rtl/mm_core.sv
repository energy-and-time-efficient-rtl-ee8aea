// mm_core: the off-chip design. Control logic plus the linear array of NB
// PEs; the matrices live outside and are fed through three I/O ports, two
// 8-bit input ports (A and B) and one 16-bit output port (C).
//
// start/rb launch an n x n product with n = rb*NB (1 <= rb <= RB_MAX). The
// core then requests one word of A and one word of B per cycle (a_req with
// a_row/a_col, b_req with b_row/b_col); the memory outside must return the
// word on a_data/b_data in the next cycle. B is requested row by row and A
// column by column, NB cycles behind B. The results leave on c_data, one
// word per cycle while c_valid is high, with their position on c_row/c_col.
// An NB x NB product (rb = 1) takes 2*NB^2 + 3 cycles from start to the last
// result; a job of rb^3 block products takes rb^3*NB^2 + NB^2 + 3.
module mm_core
  import mm_pkg::*;
#(
  parameter int unsigned NB     = 12,
  parameter int unsigned RB_MAX = 4,
  localparam int unsigned N_MAX = NB * RB_MAX,
  localparam int unsigned IW = (N_MAX > 1) ? $clog2(N_MAX) : 1,
  localparam int unsigned RW = $clog2(RB_MAX + 1)
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          start,
  input  logic [RW-1:0] rb,
  output logic          busy,
  output logic          done,
  output logic          a_req,
  output logic [IW-1:0] a_row,
  output logic [IW-1:0] a_col,
  input  din_t          a_data,
  output logic          b_req,
  output logic [IW-1:0] b_row,
  output logic [IW-1:0] b_col,
  input  din_t          b_data,
  output logic          c_valid,
  output logic [IW-1:0] c_row,
  output logic [IW-1:0] c_col,
  output acc_t          c_data
);
  ctrl_t ctrl;

  mm_ctrl #(.NB(NB), .RB_MAX(RB_MAX)) u_ctrl (
    .clk, .rst, .start, .rb, .busy, .done,
    .a_req, .a_row, .a_col, .b_req, .b_row, .b_col,
    .ctrl, .c_valid, .c_row, .c_col
  );

  mm_array #(.NB(NB)) u_array (
    .clk, .rst,
    .a_in    (a_data),
    .b_in    (b_data),
    .ctrl_in (ctrl),
    .c_out   (c_data)
  );
endmodule
