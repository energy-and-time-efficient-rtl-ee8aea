// mm_ctrl: centralized control logic and address generator.
//
// Runs one n x n matrix multiplication, n = rb*NB, as rb^3 block products
// C_xy += A_xk x B_ky of NB x NB blocks on an NB-PE linear array (block
// matrix multiplication with block size n/r = NB and r = rb). Blocks are taken
// with x outermost, then y, then k, so the rb products that build one block of
// C follow each other and accumulate in the PEs' Cbuf: the first of them is
// flushed (accumulates onto 0), the last one sends the block out.
//
// Time is cut into slots of NB cycles. In each slot one row of a B block is
// requested (b_req, row-major) and, one slot later, the matching column of the
// A block (a_req, column-major); consecutive block products follow without
// gaps, so the array stays busy and A always lags B by NB cycles. The
// requested words must arrive one cycle after the request (the read latency
// of a block RAM); the control word 'ctrl' is registered so that it arrives
// together with them at PE_1.
//
// c_valid/c_row/c_col name the matrix element on the array's C_out: each block
// of C leaves as NB^2 consecutive words in column-major order, starting three
// cycles after the request of the first A word of its final phase.
// Timing of a job: start is sampled in cycle 0; the last result leaves in
// cycle rb^3*NB^2 + NB^2 + 3, the cycle in which 'done' pulses. start is
// ignored while busy.
//
// The six control signals and the idea of a counter-based generator whose
// outputs are delayed from PE to PE follow the document. Slot sequencing,
// block order, accumulation across k in Cbuf, the request/latency interface
// and the runtime block count rb are this design's own choices.
module mm_ctrl
  import mm_pkg::*;
#(
  parameter int unsigned NB     = 12,          // block size n/r (PEs in the array)
  parameter int unsigned RB_MAX = 4,           // largest r supported
  localparam int unsigned N_MAX = NB * RB_MAX, // largest n
  localparam int unsigned IW = (N_MAX > 1) ? $clog2(N_MAX) : 1,
  localparam int unsigned BW = (RB_MAX > 1) ? $clog2(RB_MAX) : 1,
  localparam int unsigned RW = $clog2(RB_MAX + 1),
  localparam int unsigned EW = (NB > 1) ? $clog2(NB) : 1
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          start,
  input  logic [RW-1:0] rb,       // blocks per dimension for this job, 1..RB_MAX
  output logic          busy,
  output logic          done,
  output logic          a_req,
  output logic [IW-1:0] a_row,
  output logic [IW-1:0] a_col,
  output logic          b_req,
  output logic [IW-1:0] b_row,
  output logic [IW-1:0] b_col,
  output ctrl_t         ctrl,     // to PE_1, aligned with the requested data
  output logic          c_valid,
  output logic [IW-1:0] c_row,
  output logic [IW-1:0] c_col
);
  typedef struct packed {
    logic [BW-1:0] x, y, k;   // block indices
    logic [EW-1:0] kk;        // row of B_ky / column of A_xk within the block
  } pos_t;

  logic [RW-1:0] rb_q;
  logic [EW-1:0] e;           // word within the slot
  logic          b_act, a_act;
  pos_t          bp, ap;
  logic          row_par, a_par;
  logic [1:0]    os_v;        // output-start pipeline
  logic [1:0]    os_last;
  logic [BW-1:0] os_x [2];
  logic [BW-1:0] os_y [2];
  logic          oc_act, oc_last;
  logic [BW-1:0] ox, oy;
  logic [EW-1:0] oi, oj;
  logic          slot_end, b_last, a_final, out_start;
  ctrl_t         ctrl_c;

  localparam logic [EW-1:0] E_LAST = EW'(NB - 1);

  assign slot_end  = (b_act || a_act) && (e == E_LAST);
  assign b_last    = (bp.x == BW'(rb_q - 1)) && (bp.y == BW'(rb_q - 1)) &&
                     (bp.k == BW'(rb_q - 1)) && (bp.kk == E_LAST);
  assign a_final   = (ap.k == BW'(rb_q - 1)) && (ap.kk == E_LAST);
  assign out_start = a_act && a_final && (e == '0);

  // Slot and block sequencing.
  always_ff @(posedge clk) begin
    if (rst) begin
      rb_q <= RW'(1); e <= '0; b_act <= 1'b0; a_act <= 1'b0;
      bp <= '0; ap <= '0; row_par <= 1'b1; a_par <= 1'b0;
    end else if (start && !busy) begin
      rb_q  <= rb;
      e     <= '0;
      b_act <= 1'b1;
      bp    <= '0;
    end else if (b_act || a_act) begin
      e <= (e == E_LAST) ? '0 : e + 1'b1;
      if (slot_end) begin
        a_act <= b_act;
        ap    <= bp;
        a_par <= row_par;
        if (b_act) begin
          row_par <= ~row_par;
          if (b_last) b_act <= 1'b0;
          bp.kk <= (bp.kk == E_LAST) ? '0 : bp.kk + 1'b1;
          if (bp.kk == E_LAST) begin
            bp.k <= (bp.k == BW'(rb_q - 1)) ? '0 : bp.k + 1'b1;
            if (bp.k == BW'(rb_q - 1)) begin
              bp.y <= (bp.y == BW'(rb_q - 1)) ? '0 : bp.y + 1'b1;
              if (bp.y == BW'(rb_q - 1)) bp.x <= bp.x + 1'b1;
            end
          end
        end
      end
    end
  end

  // Requests and control word for PE_1.
  assign b_req = b_act;
  assign b_row = IW'(bp.k) * IW'(NB) + IW'(bp.kk);
  assign b_col = IW'(bp.y) * IW'(NB) + IW'(e);
  assign a_req = a_act;
  assign a_row = IW'(ap.x) * IW'(NB) + IW'(e);
  assign a_col = IW'(ap.k) * IW'(NB) + IW'(ap.kk);

  always_comb begin
    ctrl_c             = CTRL_IDLE;
    ctrl_c.reg_load    = b_act ? row_par : ~row_par;
    ctrl_c.mux_to_mult = a_par;
    ctrl_c.mult_ce     = a_act;
    ctrl_c.ram_we      = a_act;
    ctrl_c.flush       = a_act && (ap.k == '0) && (ap.kk == '0);
    ctrl_c.out_mux     = a_act && a_final;
  end

  always_ff @(posedge clk)
    if (rst) ctrl <= CTRL_IDLE;
    else     ctrl <= ctrl_c;

  // Output sequencer: names the words leaving PE_1.
  always_ff @(posedge clk) begin
    if (rst) begin
      os_v <= '0; os_last <= '0;
      os_x <= '{default: '0}; os_y <= '{default: '0};
      oc_act <= 1'b0; oc_last <= 1'b0; ox <= '0; oy <= '0; oi <= '0; oj <= '0;
    end else begin
      os_v[0]    <= out_start;
      os_last[0] <= (ap.x == BW'(rb_q - 1)) && (ap.y == BW'(rb_q - 1));
      os_x[0]    <= ap.x;
      os_y[0]    <= ap.y;
      os_v[1]    <= os_v[0];
      os_last[1] <= os_last[0];
      os_x[1]    <= os_x[0];
      os_y[1]    <= os_y[0];
      if (os_v[1]) begin
        oc_act <= 1'b1; oc_last <= os_last[1];
        ox <= os_x[1]; oy <= os_y[1]; oi <= '0; oj <= '0;
      end else if (oc_act) begin
        oi <= (oi == E_LAST) ? '0 : oi + 1'b1;
        if (oi == E_LAST) begin
          oj <= oj + 1'b1;
          if (oj == E_LAST) oc_act <= 1'b0;
        end
      end
    end
  end

  assign c_valid = oc_act;
  assign c_row   = IW'(ox) * IW'(NB) + IW'(oi);
  assign c_col   = IW'(oy) * IW'(NB) + IW'(oj);
  assign done    = oc_act && oc_last && (oi == E_LAST) && (oj == E_LAST);
  assign busy    = b_act || a_act || (|os_v) || oc_act;

  a_rb_range: assert property (@(posedge clk) disable iff (rst)
    (start && !busy) |-> (rb >= RW'(1) && rb <= RW'(RB_MAX)));
endmodule
