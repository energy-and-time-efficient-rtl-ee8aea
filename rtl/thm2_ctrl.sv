// thm2_ctrl: control logic and address generator of the Theorem 2 design.
//
// One job is an n x n product, n = R*NB, done in R stages k = 1..R. In stage
// k the R A ports carry A_1k..A_Rk and the R B ports carry B_k1..B_kR in
// lock step, so one row index and one column index serve all ports: B row by
// row (b_row, word b_e of the row, port y adds y*NB to the column), A column
// by column NB cycles later (a_col, word a_e of the column, port x adds x*NB
// to the row). Stages follow each other with no gap: the last A column of a
// stage enters while the first B row of the next one does, giving
// R*NB^2 + 2*NB cycles of computation as in the document.
//
// The six control signals are produced as in mm_ctrl: reg_load toggles once
// per B row, mux_to_mult follows it one row later, mult_ce/ram_we mark valid A
// words, flush marks the first phase of stage 1 and out_mux the last phase of
// stage R. 'ctrl' is registered so that it meets the data requested one cycle
// earlier. The result streams on the R C ports are named by c_valid, c_row
// (row of C, the same on all ports) and c_j (column within the block; port y
// adds y*NB): port y sends C_1y, C_2y, ..., C_Ry, R*NB^2 words in all,
// starting three cycles after the request of the first A word of the final
// phase. done pulses with the last word, 2*R*NB^2 + 3 cycles after start;
// start is ignored while busy.
module thm2_ctrl
  import mm_pkg::*;
#(
  parameter int unsigned NB = 4,
  parameter int unsigned R  = 4,
  localparam int unsigned N  = NB * R,
  localparam int unsigned IW = (N > 1) ? $clog2(N) : 1,
  localparam int unsigned SW = (R > 1) ? $clog2(R) : 1,
  localparam int unsigned EW = (NB > 1) ? $clog2(NB) : 1
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          start,
  output logic          busy,
  output logic          done,
  output logic          a_req,
  output logic [EW-1:0] a_e,
  output logic [IW-1:0] a_col,
  output logic          b_req,
  output logic [IW-1:0] b_row,
  output logic [EW-1:0] b_e,
  output ctrl_t         ctrl,
  output logic          c_valid,
  output logic [IW-1:0] c_row,
  output logic [EW-1:0] c_j
);
  localparam logic [EW-1:0] E_LAST = EW'(NB - 1);
  localparam logic [SW-1:0] K_LAST = SW'(R - 1);

  logic [EW-1:0] e;
  logic          b_act, a_act, row_par, a_par;
  logic [SW-1:0] bk, ak;
  logic [EW-1:0] bkk, akk;
  logic [1:0]    os_v;
  logic          oc_act;
  logic [SW-1:0] oseg;
  logic [EW-1:0] oi, oj;
  logic          slot_end, a_final;
  ctrl_t         ctrl_c;

  assign slot_end = (b_act || a_act) && (e == E_LAST);
  assign a_final  = (ak == K_LAST) && (akk == E_LAST);

  always_ff @(posedge clk) begin
    if (rst) begin
      e <= '0; b_act <= 1'b0; a_act <= 1'b0; row_par <= 1'b1; a_par <= 1'b0;
      bk <= '0; bkk <= '0; ak <= '0; akk <= '0;
    end else if (start && !busy) begin
      e <= '0; b_act <= 1'b1; bk <= '0; bkk <= '0;
    end else if (b_act || a_act) begin
      e <= (e == E_LAST) ? '0 : e + 1'b1;
      if (slot_end) begin
        a_act <= b_act; ak <= bk; akk <= bkk; a_par <= row_par;
        if (b_act) begin
          row_par <= ~row_par;
          if (bk == K_LAST && bkk == E_LAST) b_act <= 1'b0;
          bkk <= (bkk == E_LAST) ? '0 : bkk + 1'b1;
          if (bkk == E_LAST) bk <= bk + 1'b1;
        end
      end
    end
  end

  assign b_req = b_act;
  assign b_row = IW'(bk) * IW'(NB) + IW'(bkk);
  assign b_e   = e;
  assign a_req = a_act;
  assign a_e   = e;
  assign a_col = IW'(ak) * IW'(NB) + IW'(akk);

  always_comb begin
    ctrl_c             = CTRL_IDLE;
    ctrl_c.reg_load    = b_act ? row_par : ~row_par;
    ctrl_c.mux_to_mult = a_par;
    ctrl_c.mult_ce     = a_act;
    ctrl_c.ram_we      = a_act;
    ctrl_c.flush       = a_act && (ak == '0) && (akk == '0);
    ctrl_c.out_mux     = a_act && a_final;
  end

  always_ff @(posedge clk)
    if (rst) ctrl <= CTRL_IDLE;
    else     ctrl <= ctrl_c;

  // Output sequencer over R segments of NB x NB words.
  always_ff @(posedge clk) begin
    if (rst) begin
      os_v <= '0; oc_act <= 1'b0; oseg <= '0; oi <= '0; oj <= '0;
    end else begin
      os_v <= {os_v[0], a_act && a_final && (e == '0)};
      if (os_v[1]) begin
        oc_act <= 1'b1; oseg <= '0; oi <= '0; oj <= '0;
      end else if (oc_act) begin
        oi <= (oi == E_LAST) ? '0 : oi + 1'b1;
        if (oi == E_LAST) begin
          oj <= (oj == E_LAST) ? '0 : oj + 1'b1;
          if (oj == E_LAST) begin
            oseg <= oseg + 1'b1;
            if (oseg == K_LAST) oc_act <= 1'b0;
          end
        end
      end
    end
  end

  assign c_valid = oc_act;
  assign c_row   = IW'(oseg) * IW'(NB) + IW'(oi);
  assign c_j     = oj;
  assign done    = oc_act && (oseg == K_LAST) && (oi == E_LAST) && (oj == E_LAST);
  assign busy    = b_act || a_act || (|os_v) || oc_act;
endmodule
