// thm2_core: the off-chip Theorem 2 design, control logic plus the array of
// NB PEs with R^2 MACs each, fed through 3R I/O ports: R 8-bit A ports, R
// 8-bit B ports and R 16-bit C ports.
//
// A pulse on start multiplies two n x n matrices, n = R*NB, held in an
// external memory. Each cycle the core requests one word per A port and one
// per B port (a_row[x]/a_col, b_row/b_col[y]); the memory must answer on
// a_data[x]/b_data[y] in the next cycle. Results leave on c_data[y] while
// c_valid is high, at position (c_row, c_col[y]). Computation takes
// R*NB^2 + 2*NB cycles (the document's n^2/r + 2n/r) and the job ends,
// results drained, 2*R*NB^2 + 3 cycles after start. The defaults NB = 4,
// R = 4 are the 16 x 16 design with block size 4 of the document's Table VII.
// Port 0 addresses the first block row or column, so the upper bits of
// a_row[0], b_col[0] and c_col[0] are always zero.
module thm2_core
  import mm_pkg::*;
#(
  parameter int unsigned NB = 4,
  parameter int unsigned R  = 4,
  localparam int unsigned N  = NB * R,
  localparam int unsigned IW = (N > 1) ? $clog2(N) : 1,
  localparam int unsigned EW = (NB > 1) ? $clog2(NB) : 1
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          start,
  output logic          busy,
  output logic          done,
  output logic          a_req,
  output logic [IW-1:0] a_row [R],
  output logic [IW-1:0] a_col,
  input  din_t          a_data [R],
  output logic          b_req,
  output logic [IW-1:0] b_row,
  output logic [IW-1:0] b_col [R],
  input  din_t          b_data [R],
  output logic          c_valid,
  output logic [IW-1:0] c_row,
  output logic [IW-1:0] c_col [R],
  output acc_t          c_data [R]
);
  ctrl_t ctrl;
  logic [EW-1:0] a_e, b_e, c_j;

  thm2_ctrl #(.NB(NB), .R(R)) u_ctrl (
    .clk, .rst, .start, .busy, .done,
    .a_req, .a_e, .a_col, .b_req, .b_row, .b_e,
    .ctrl, .c_valid, .c_row, .c_j
  );

  for (genvar p = 0; p < R; p++) begin : g_port
    assign a_row[p] = IW'(p) * IW'(NB) + IW'(a_e);
    assign b_col[p] = IW'(p) * IW'(NB) + IW'(b_e);
    assign c_col[p] = IW'(p) * IW'(NB) + IW'(c_j);
  end

  thm2_array #(.NB(NB), .R(R)) u_array (
    .clk, .rst,
    .a_in (a_data), .b_in (b_data), .ctrl_in (ctrl), .c_out (c_data)
  );
endmodule
