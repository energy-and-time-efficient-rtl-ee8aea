// thm2_pe: processing element PE_j of the Theorem 2 array, R^2 MACs per PE.
//
// The n x n matrices are cut into R x R blocks of NB x NB (n = R*NB). In stage
// k the array receives the A blocks A_1k..A_Rk on R input ports and the B
// blocks B_k1..B_kR on R more ports; MAC_xy multiplies A_xk by B_ky exactly as
// the single-MAC PE does, and accumulates column j of C_xy in its own Cbuf_xy
// over the R stages. The sharing that saves registers: PE_j has one A register
// per A port (A_x, shared by the R MACs of row x) and one BU/BM/BL set per B
// port (shared by the R MACs of column y), 4R registers in all instead of
// 4R^2.
//
// Results leave on R output ports. Port y carries C_1y, C_2y, ..., C_Ry, one
// block of NB^2 words after the other in column-major order. When the last
// stage finishes, column j of C_1y goes out straight from MAC_1y while column
// j of C_xy, x >= 2, is parked in a hold buffer; each is sent (x-1)*NB^2
// cycles later. Between its own columns the port forwards, through an NB-word
// delay line, what PE_(j+1) sends on the same port. Each PE thus has R^2 Cbufs
// and R^2 output-side memories (R delay lines and R(R-1) hold buffers), 2R^2
// local memories of NB words.
//
// Timing is that of mm_pe: inputs in cycle t, Mult stage t+1, Acc stage t+2,
// C_out combinational from the Acc stage or a buffer; A, B forwarded after one
// cycle, reg_load after two, the other control signals after one. The
// out-of-order parking of C_xy follows the idea of the document's algorithm
// for R = 2; the port-per-column-of-blocks ordering, the hold-buffer sequencer
// inside the PE and the delay-line CObuf are this design's own. NB >= 2.
//
// The Acc-stage copy of the control word uses only ram_we, flush and out_mux;
// its reg_load, mux_to_mult and mult_ce bits act one stage earlier and are
// left unused there on purpose.
module thm2_pe
  import mm_pkg::*;
#(
  parameter int unsigned NB = 4,   // block size n/r
  parameter int unsigned R  = 4    // blocks per dimension, r
) (
  input  logic  clk,
  input  logic  rst,
  input  din_t  a_in  [R],
  input  din_t  b_in  [R],
  input  ctrl_t ctrl_in,
  output din_t  a_out [R],
  output din_t  b_out [R],
  output ctrl_t ctrl_out,
  input  acc_t  c_in  [R],
  output acc_t  c_out [R]
);
  localparam int unsigned AW = (NB > 1) ? $clog2(NB) : 1;
  localparam int unsigned SW = (R > 1) ? $clog2(R) : 1;

  din_t  a_q [R];
  din_t  bu_q [R];
  din_t  bm_q [R];
  din_t  bl_q [R];
  logic  ld_prev, ld_d2, om_prev;
  ctrl_t c1, c2;
  logic [AW-1:0] row_cnt, addr_q, wptr, rptr;
  acc_t  sum   [R][R];
  acc_t  cb_rd [R][R];
  acc_t  hold_rd [R][R];
  acc_t  dl_rd [R];
  // output sequencer: segment (block row x), column and row of the port stream
  logic          sq_act;
  logic [SW-1:0] sq_seg;
  logic [AW-1:0] sq_col, sq_row;
  localparam logic [AW-1:0] L = AW'(NB - 1);

  always_ff @(posedge clk) begin
    if (rst) begin
      a_q <= '{default: '0}; bu_q <= '{default: '0};
      bm_q <= '{default: '0}; bl_q <= '{default: '0};
      ld_prev <= 1'b0; ld_d2 <= 1'b0;
      c1 <= CTRL_IDLE; c2 <= CTRL_IDLE;
    end else begin
      a_q  <= a_in;
      bu_q <= b_in;
      if (ctrl_in.reg_load != ld_prev) begin
        if (ctrl_in.reg_load) bl_q <= b_in;
        else                  bm_q <= b_in;
      end
      ld_prev <= ctrl_in.reg_load;
      ld_d2   <= ld_prev;
      c1 <= ctrl_in;
      c2 <= c1;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      row_cnt <= '0; addr_q <= '0;
    end else if (c1.mult_ce) begin
      addr_q  <= row_cnt;
      row_cnt <= (row_cnt == L) ? '0 : row_cnt + 1'b1;
    end
  end

  for (genvar x = 0; x < R; x++) begin : g_x
    for (genvar y = 0; y < R; y++) begin : g_y
      mm_mac u_mac (
        .clk, .rst,
        .ce     (c1.mult_ce),
        .a      (a_q[x]),
        .b      (c1.mux_to_mult ? bl_q[y] : bm_q[y]),
        .flush  (c2.flush),
        .acc_in (cb_rd[x][y]),
        .sum    (sum[x][y])
      );
      mm_lmem #(.DEPTH(NB), .W(CW)) u_cbuf (
        .clk, .we (c2.ram_we), .waddr (addr_q), .wdata (sum[x][y]),
        .raddr (addr_q), .rdata (cb_rd[x][y])
      );
      if (x > 0) begin : g_hold
        // column j of C_xy, parked until its turn on port y
        mm_lmem #(.DEPTH(NB), .W(CW)) u_hold (
          .clk, .we (c2.out_mux), .waddr (addr_q), .wdata (sum[x][y]),
          .raddr (sq_row), .rdata (hold_rd[x][y])
        );
      end else begin : g_nohold
        assign hold_rd[x][y] = '0;
      end
    end
  end

  // Output sequencer, started by the first cycle of the final phase.
  always_ff @(posedge clk) begin
    if (rst) begin
      om_prev <= 1'b0; sq_act <= 1'b0; sq_seg <= '0; sq_col <= '0; sq_row <= '0;
    end else begin
      om_prev <= c2.out_mux;
      if (c2.out_mux && !om_prev) begin
        // this cycle is (segment 0, column 0, row 0); continue from row 1
        sq_act <= 1'b1; sq_seg <= '0; sq_col <= '0; sq_row <= AW'(1);
      end else if (sq_act) begin
        sq_row <= (sq_row == L) ? '0 : sq_row + 1'b1;
        if (sq_row == L) begin
          sq_col <= (sq_col == L) ? '0 : sq_col + 1'b1;
          if (sq_col == L) begin
            sq_seg <= sq_seg + 1'b1;
            if (sq_seg == SW'(R - 1)) sq_act <= 1'b0;
          end
        end
      end
    end
  end

  // Delay lines (CObuf): C_in to the output mux in NB-1 cycles.
  always_ff @(posedge clk)
    if (rst) wptr <= '0;
    else     wptr <= (wptr == L) ? '0 : wptr + 1'b1;
  assign rptr = (wptr == L) ? '0 : wptr + 1'b1;

  for (genvar y = 0; y < R; y++) begin : g_port
    mm_lmem #(.DEPTH(NB), .W(CW)) u_cobuf (
      .clk, .we (1'b1), .waddr (wptr), .wdata (c_in[y]),
      .raddr (rptr), .rdata (dl_rd[y])
    );
    always_comb begin
      if (c2.out_mux)
        c_out[y] = sum[0][y];
      else if (sq_act && sq_col == '0 && sq_seg != '0)
        c_out[y] = hold_rd[sq_seg][y];
      else
        c_out[y] = dl_rd[y];
    end
  end

  assign a_out = a_q;
  assign b_out = bu_q;
  always_comb begin
    ctrl_out          = c1;
    ctrl_out.reg_load = ld_d2;
  end

  if (NB < 2) begin : g_check
    $error("thm2_pe needs a block size NB of at least 2");
  end
endmodule
