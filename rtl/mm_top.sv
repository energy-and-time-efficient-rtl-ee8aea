// mm_top: the on-chip design. A, B and C are held in on-chip block memories
// next to the control logic and the linear array of NB PEs (block size n/r).
//
// A host first writes A and B (host_we, host_sel 0 = A / 1 = B, element
// position host_row/host_col, 8-bit two's-complement word). A pulse on start
// with rb (1..RB_MAX) multiplies the top-left n x n corner, n = rb*NB, as rb^3
// block products of NB x NB blocks; C is written into its memory as the
// results leave the array, and done pulses with the last one. C is read back
// through host_c_re/host_c_row/host_c_col, the 16-bit word following one cycle
// later on host_c_rdata. Every memory is addressed row*N_MAX + col.
//
// Beside it, with its own host ports, stands the on-chip design of Theorem 2
// (thm2_onchip): T2_NB PEs with T2_R^2 MACs each, fed by 3*T2_R streams from
// banked on-chip memories. It is loaded and read back the same way, through
// the t2_host_* ports, and started with t2_start.
//
// Defaults: NB = 12 and RB_MAX = 4 give the 48 x 48 configuration with block
// size 12 that the document evaluates in most detail; the same hardware runs
// 12 x 12 and 24 x 24 with block size 12. A job takes rb^3*NB^2 + NB^2 + 3
// cycles from start to done. T2_NB = 4, T2_R = 4 is the 16 x 16 Theorem 2
// design with block size 4; its job takes 2*T2_R*T2_NB^2 + 4 cycles.
module mm_top
  import mm_pkg::*;
#(
  parameter int unsigned NB     = 12,
  parameter int unsigned RB_MAX = 4,
  parameter int unsigned T2_NB  = 4,           // Theorem 2 design: block size n/r
  parameter int unsigned T2_R   = 4,           // Theorem 2 design: r
  localparam int unsigned N_MAX = NB * RB_MAX,
  localparam int unsigned T2_IW = $clog2(T2_NB * T2_R),
  localparam int unsigned IW = (N_MAX > 1) ? $clog2(N_MAX) : 1,
  localparam int unsigned RW = $clog2(RB_MAX + 1),
  localparam int unsigned DEPTH = N_MAX * N_MAX,
  localparam int unsigned MW = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic          clk,
  input  logic          rst,
  // host load port for A and B
  input  logic          host_we,
  input  logic          host_sel,
  input  logic [IW-1:0] host_row,
  input  logic [IW-1:0] host_col,
  input  din_t          host_wdata,
  // host read port for C
  input  logic          host_c_re,
  input  logic [IW-1:0] host_c_row,
  input  logic [IW-1:0] host_c_col,
  output acc_t          host_c_rdata,
  // job control
  input  logic          start,
  input  logic [RW-1:0] rb,
  output logic          busy,
  output logic          done,
  // Theorem 2 design, on-chip: its own host ports and job control
  input  logic             t2_host_we,
  input  logic             t2_host_sel,
  input  logic [T2_IW-1:0] t2_host_row,
  input  logic [T2_IW-1:0] t2_host_col,
  input  din_t             t2_host_wdata,
  input  logic             t2_host_c_re,
  input  logic [T2_IW-1:0] t2_host_c_row,
  input  logic [T2_IW-1:0] t2_host_c_col,
  output acc_t             t2_host_c_rdata,
  input  logic             t2_start,
  output logic             t2_busy,
  output logic             t2_done
);
  logic          a_req, b_req, c_valid;
  logic [IW-1:0] a_row, a_col, b_row, b_col, c_row, c_col;
  din_t          a_data, b_data;
  acc_t          c_data;

  function automatic logic [MW-1:0] addr(input logic [IW-1:0] r, input logic [IW-1:0] c);
    return MW'(r) * MW'(N_MAX) + MW'(c);
  endfunction

  mm_bsram #(.DEPTH(DEPTH), .W(DW)) u_mem_a (
    .clk, .we (host_we && !host_sel), .waddr (addr(host_row, host_col)), .wdata (host_wdata),
    .re (a_req), .raddr (addr(a_row, a_col)), .rdata (a_data)
  );

  mm_bsram #(.DEPTH(DEPTH), .W(DW)) u_mem_b (
    .clk, .we (host_we && host_sel), .waddr (addr(host_row, host_col)), .wdata (host_wdata),
    .re (b_req), .raddr (addr(b_row, b_col)), .rdata (b_data)
  );

  mm_bsram #(.DEPTH(DEPTH), .W(CW)) u_mem_c (
    .clk, .we (c_valid), .waddr (addr(c_row, c_col)), .wdata (c_data),
    .re (host_c_re), .raddr (addr(host_c_row, host_c_col)), .rdata (host_c_rdata)
  );

  mm_core #(.NB(NB), .RB_MAX(RB_MAX)) u_core (
    .clk, .rst, .start, .rb, .busy, .done,
    .a_req, .a_row, .a_col, .a_data,
    .b_req, .b_row, .b_col, .b_data,
    .c_valid, .c_row, .c_col, .c_data
  );

  thm2_onchip #(.NB(T2_NB), .R(T2_R)) u_thm2 (
    .clk, .rst,
    .host_we (t2_host_we), .host_sel (t2_host_sel),
    .host_row (t2_host_row), .host_col (t2_host_col), .host_wdata (t2_host_wdata),
    .host_c_re (t2_host_c_re), .host_c_row (t2_host_c_row), .host_c_col (t2_host_c_col),
    .host_c_rdata (t2_host_c_rdata),
    .start (t2_start), .busy (t2_busy), .done (t2_done)
  );
endmodule
