// thm2_onchip: the on-chip Theorem 2 design. The matrices are held in on-chip
// block memories next to thm2_core (R^2 MACs per PE, R A, R B and R C
// streams), so no matrix data crosses the chip boundary during a job.
//
// Each of the 3R streams needs its own memory port, so every matrix is split
// into R banks of NB*N words (n = N = R*NB):
//   A bank x holds block row x of A      (rows x*NB .. x*NB+NB-1),
//                 word (i - x*NB)*N + col
//   B bank y holds block column y of B   (columns y*NB .. y*NB+NB-1),
//                 word row*NB + (j - y*NB)
//   C bank y holds block column y of C, laid out like B.
// In every cycle of a job, A port x reads bank x, B port y reads bank y and C
// port y writes bank y, so no two streams share a bank.
//
// Interface and timing:
// - Load: the host writes A and B elements through host_we, host_sel
//   (0 = A, 1 = B), host_row/host_col and host_wdata. The bank is chosen
//   from the row (A) or column (B).
// - Job: a pulse on start multiplies A x B and writes C into its banks.
//   done pulses 2*R*NB^2 + 4 cycles after start: the core's 2*R*NB^2 + 3,
//   plus one cycle for the last C write to land.
// - Read-back: C element (host_c_row, host_c_col) is requested with
//   host_c_re; the word appears on host_c_rdata one cycle later. It stays
//   there until the next request. start is ignored while busy.
//
// Holding A, B and C in block memories follows the document's on-chip
// scenario. The R-way banking, the layout inside a bank and the host ports
// are this design's own choices; the document counts memories only as
// ceil(2n^2/1024) block RAMs of 1024 words.
module thm2_onchip
  import mm_pkg::*;
#(
  parameter int unsigned NB = 4,
  parameter int unsigned R  = 4,
  localparam int unsigned N  = NB * R,
  localparam int unsigned IW = (N > 1) ? $clog2(N) : 1,
  localparam int unsigned BD = NB * N,                   // words per bank
  localparam int unsigned BW = (BD > 1) ? $clog2(BD) : 1
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
  output logic          busy,
  output logic          done
);
  logic          a_req, b_req, c_valid, core_busy, core_done;
  logic [IW-1:0] a_row [R];
  logic [IW-1:0] b_col [R];
  logic [IW-1:0] c_col [R];
  logic [IW-1:0] a_col, b_row, c_row;
  din_t          a_data [R];
  din_t          b_data [R];
  acc_t          c_data [R];
  acc_t          c_rd   [R];
  logic [IW-1:0] c_bank_q;

  // word inside a row bank (A) and inside a column bank (B, C)
  function automatic logic [BW-1:0] row_addr(input logic [IW-1:0] r, input logic [IW-1:0] c);
    return BW'(int'(r) % NB) * BW'(N) + BW'(c);
  endfunction

  function automatic logic [BW-1:0] col_addr(input logic [IW-1:0] r, input logic [IW-1:0] c);
    return BW'(r) * BW'(NB) + BW'(int'(c) % NB);
  endfunction

  thm2_core #(.NB(NB), .R(R)) u_core (
    .clk, .rst, .start (start && !busy), .busy (core_busy), .done (core_done),
    .a_req, .a_row, .a_col, .a_data,
    .b_req, .b_row, .b_col, .b_data,
    .c_valid, .c_row, .c_col, .c_data
  );

  for (genvar p = 0; p < R; p++) begin : g_bank
    mm_bsram #(.DEPTH(BD), .W(DW)) u_mem_a (
      .clk,
      .we    (host_we && !host_sel && (int'(host_row) / NB == p)),
      .waddr (row_addr(host_row, host_col)), .wdata (host_wdata),
      .re    (a_req), .raddr (row_addr(a_row[p], a_col)), .rdata (a_data[p])
    );

    mm_bsram #(.DEPTH(BD), .W(DW)) u_mem_b (
      .clk,
      .we    (host_we && host_sel && (int'(host_col) / NB == p)),
      .waddr (col_addr(host_row, host_col)), .wdata (host_wdata),
      .re    (b_req), .raddr (col_addr(b_row, b_col[p])), .rdata (b_data[p])
    );

    mm_bsram #(.DEPTH(BD), .W(CW)) u_mem_c (
      .clk,
      .we    (c_valid), .waddr (col_addr(c_row, c_col[p])), .wdata (c_data[p]),
      .re    (host_c_re), .raddr (col_addr(host_c_row, host_c_col)), .rdata (c_rd[p])
    );
  end

  // bank of the C word being read back, aligned with the memory output
  always_ff @(posedge clk) begin
    if (host_c_re) c_bank_q <= IW'(int'(host_c_col) / NB);
  end

  always_comb begin
    host_c_rdata = c_rd[0];
    for (int p = 1; p < R; p++)
      if (c_bank_q == IW'(p)) host_c_rdata = c_rd[p];
  end

  // the job is over once the last C word has been written
  always_ff @(posedge clk) begin
    if (rst) done <= 1'b0;
    else     done <= core_done;
  end

  assign busy = core_busy || done;
endmodule
