// mm_pe: processing element PE_j of the linear array (one MAC per PE).
//
// PE_j computes column j of the NB x NB product C = A x B. Elements of A pass
// through register A for one cycle each. Elements of B pass through BU; the
// element b_kj that belongs to this column is copied into BM or BL, the two
// registers alternating from one row of B to the next, and stays there until
// the whole column k of A has passed. Each A word is multiplied with the
// selected copy and added to c'_ij held in the local memory Cbuf at address i.
// When column j is final it is sent left on C_out for NB cycles, straight from
// the accumulator; after that the PE forwards, through CObuf, the columns that
// arrive on C_in from PE_(j+1). CObuf therefore lets a finished C be moved out
// while the next product already accumulates in Cbuf.
//
// Pipeline (cycle t = words on the inputs):
//   t   : A <= a_in, BU <= b_in, BM or BL <= b_in on a reg_load change
//   t+1 : Mult stage, product of A and BM/BL registered
//   t+2 : Acc stage, sum = (flush ? 0 : Cbuf[i]) + product, Cbuf[i] <= sum,
//         C_out = out_mux ? sum : CObuf word
// CObuf is a circular buffer written with C_in every cycle and read NB-1
// cycles later, which is exactly the skew between PE_(j+1)'s first result and
// the end of PE_j's own column on C_out. a_out/b_out are registered (one cycle
// per PE); the control word is forwarded with a one-cycle delay for the A
// fields and a two-cycle delay for reg_load, matching the arrival of b_kj at
// PE_j in cycle (k-1)n+2j-1 while a_ik arrives in cycle kn+i+j-1.
//
// The registers A, BU, BM, BL, the MAC, Cbuf, CObuf, the output mux and the
// six control signals follow the document. The exact stage timing, the
// asynchronous-read local memories, the row-address counter inside the PE and
// the CObuf delay-line addressing are this design's own choices.
//
// The Acc-stage copy of the control word uses only ram_we, flush and out_mux;
// its reg_load, mux_to_mult and mult_ce bits act one stage earlier and are
// left unused there on purpose.
module mm_pe
  import mm_pkg::*;
#(
  parameter int unsigned NB = 12   // block size n/r = number of PEs in the array
) (
  input  logic  clk,
  input  logic  rst,
  input  din_t  a_in,
  input  din_t  b_in,
  input  ctrl_t ctrl_in,
  output din_t  a_out,
  output din_t  b_out,
  output ctrl_t ctrl_out,
  input  acc_t  c_in,
  output acc_t  c_out
);
  localparam int unsigned AW = (NB > 1) ? $clog2(NB) : 1;

  din_t  a_q, bu_q, bm_q, bl_q;
  logic  ld_prev, ld_d2;
  ctrl_t c1, c2;
  logic [AW-1:0] row_cnt, addr_q, wptr, rptr;
  acc_t  sum, cbuf_rd, cobuf_rd;

  // Register stage: systolic A and BU, prefetch copies BM / BL.
  always_ff @(posedge clk) begin
    if (rst) begin
      a_q <= '0; bu_q <= '0; bm_q <= '0; bl_q <= '0;
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

  // Row address of Cbuf: one step per valid A word, wrapping at NB.
  always_ff @(posedge clk) begin
    if (rst) begin
      row_cnt <= '0; addr_q <= '0;
    end else if (c1.mult_ce) begin
      addr_q  <= row_cnt;
      row_cnt <= (row_cnt == AW'(NB - 1)) ? '0 : row_cnt + 1'b1;
    end
  end

  mm_mac u_mac (
    .clk    (clk),
    .rst    (rst),
    .ce     (c1.mult_ce),
    .a      (a_q),
    .b      (c1.mux_to_mult ? bl_q : bm_q),
    .flush  (c2.flush),
    .acc_in (cbuf_rd),
    .sum    (sum)
  );

  mm_lmem #(.DEPTH(NB), .W(CW)) u_cbuf (
    .clk (clk), .we (c2.ram_we), .waddr (addr_q), .wdata (sum),
    .raddr (addr_q), .rdata (cbuf_rd)
  );

  // CObuf: NB-word circular buffer, delay NB-1 cycles from C_in to its output.
  always_ff @(posedge clk)
    if (rst) wptr <= '0;
    else     wptr <= (wptr == AW'(NB - 1)) ? '0 : wptr + 1'b1;
  assign rptr = (wptr == AW'(NB - 1)) ? '0 : wptr + 1'b1;

  mm_lmem #(.DEPTH(NB), .W(CW)) u_cobuf (
    .clk (clk), .we (1'b1), .waddr (wptr), .wdata (c_in),
    .raddr (rptr), .rdata (cobuf_rd)
  );

  assign c_out = c2.out_mux ? sum : cobuf_rd;
  assign a_out = a_q;
  assign b_out = bu_q;
  always_comb begin
    ctrl_out          = c1;
    ctrl_out.reg_load = ld_d2;
  end

  // A copy of B is only replaced once per row: reg_load may not toggle on
  // two consecutive cycles unless the block size is 1.
  a_load_spacing: assert property (@(posedge clk) disable iff (rst)
    (NB > 1 && ctrl_in.reg_load != ld_prev) |=> (ctrl_in.reg_load == ld_prev));
endmodule
