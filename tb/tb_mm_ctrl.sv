// tb_mm_ctrl: test of the control logic and address generator
// (NB = 2, RB_MAX = 3), with jobs of rb = 2, 3 and 1.
//
// The request streams are compared with sequences enumerated here: B words
// in the order x, y, k, row, column (row-major blocks), one per cycle from the
// cycle after start, and the A words of the same block product column by
// column exactly NB cycles later. The registered control word is checked
// against the A request of the cycle before (mult_ce, ram_we, flush on the
// first column of the first k block, out_mux on the last column of the last k
// block, mux_to_mult equal to the reg_load level of the matching B row), and
// reg_load must toggle exactly once per B row. The c_valid stream must name
// the blocks of C in column-major order, starting three cycles after the A
// request that opens each final phase, and done must pulse on the last one,
// rb^3*NB^2 + NB^2 + 3 cycles after start.
module tb_mm_ctrl;
  import mm_pkg::*;
  localparam int NB = 2, RB_MAX = 3, N_MAX = NB * RB_MAX;
  localparam int IW = $clog2(N_MAX), RW = $clog2(RB_MAX + 1);

  logic clk = 1'b0, rst = 1'b1, start = 1'b0;
  logic [RW-1:0] rb = '0;
  logic busy, done, a_req, b_req, c_valid;
  logic [IW-1:0] a_row, a_col, b_row, b_col, c_row, c_col;
  ctrl_t ctrl;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  mm_ctrl #(.NB(NB), .RB_MAX(RB_MAX)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  task automatic run_job(input int nrb);
    int nb_words, total, cyc;
    int b_r[$], b_c[$], a_r[$], a_c[$], c_r[$], c_c[$];
    int a_first[$], a_last[$];
    int n_toggle, n_b, n_a, n_c, first_final, done_cyc;
    logic prev_lvl, a_req_q, a_first_q, a_last_q, b_lvl_q[$];
    // enumerate expected streams
    for (int x = 0; x < nrb; x++)
      for (int y = 0; y < nrb; y++) begin
        for (int k = 0; k < nrb; k++)
          for (int kk = 0; kk < NB; kk++)
            for (int e = 0; e < NB; e++) begin
              b_r.push_back(k * NB + kk); b_c.push_back(y * NB + e);
              a_r.push_back(x * NB + e);  a_c.push_back(k * NB + kk);
              a_first.push_back(int'(k == 0 && kk == 0));
              a_last.push_back(int'(k == nrb - 1 && kk == NB - 1));
            end
        for (int j = 0; j < NB; j++)
          for (int i = 0; i < NB; i++) begin
            c_r.push_back(x * NB + i); c_c.push_back(y * NB + j);
          end
      end
    nb_words = b_r.size();
    total = nrb * nrb * nrb * NB * NB + NB * NB + 3;
    @(negedge clk);
    rb = RW'(nrb); start = 1;
    prev_lvl = ctrl.reg_load;
    n_toggle = 0; n_b = 0; n_a = 0; n_c = 0; first_final = -1; done_cyc = -1;
    a_req_q = 0; a_first_q = 0; a_last_q = 0;
    for (cyc = 1; cyc <= total + 4; cyc++) begin
      @(negedge clk);
      start = 0;
      // control word registered from the previous cycle's A request
      check(ctrl.mult_ce == a_req_q && ctrl.ram_we == a_req_q, $sformatf("cyc %0d: mult_ce/ram_we", cyc));
      check(ctrl.flush == (a_req_q && a_first_q), $sformatf("cyc %0d: flush", cyc));
      check(ctrl.out_mux == (a_req_q && a_last_q), $sformatf("cyc %0d: out_mux", cyc));
      if (ctrl.reg_load != prev_lvl) begin
        n_toggle++;
        b_lvl_q.push_back(ctrl.reg_load);
      end
      if (a_req_q && (n_a - 1) % NB == 0)
        check(b_lvl_q.size() > 0 && ctrl.mux_to_mult == b_lvl_q.pop_front(), $sformatf("cyc %0d: mux_to_mult", cyc));
      prev_lvl = ctrl.reg_load;
      a_req_q = a_req; a_first_q = 0; a_last_q = 0;
      check(b_req == (cyc >= 1 && cyc <= nb_words), $sformatf("cyc %0d: b_req", cyc));
      if (b_req && n_b < nb_words) begin
        check(b_row == IW'(b_r[n_b]) && b_col == IW'(b_c[n_b]),
              $sformatf("cyc %0d: B address (%0d,%0d) expected (%0d,%0d)", cyc, b_row, b_col, b_r[n_b], b_c[n_b]));
        n_b++;
      end
      check(a_req == (cyc >= 1 + NB && cyc <= nb_words + NB), $sformatf("cyc %0d: a_req", cyc));
      if (a_req && n_a < nb_words) begin
        check(a_row == IW'(a_r[n_a]) && a_col == IW'(a_c[n_a]),
              $sformatf("cyc %0d: A address (%0d,%0d) expected (%0d,%0d)", cyc, a_row, a_col, a_r[n_a], a_c[n_a]));
        a_first_q = logic'(a_first[n_a]); a_last_q = logic'(a_last[n_a]);
        if (a_last[n_a] && first_final < 0) first_final = cyc;
        n_a++;
      end
      if (c_valid) begin
        if (n_c == 0) check(cyc == first_final + 3, $sformatf("first result at %0d, expected %0d", cyc, first_final + 3));
        check(n_c < c_r.size() && c_row == IW'(c_r[n_c]) && c_col == IW'(c_c[n_c]),
              $sformatf("cyc %0d: C position (%0d,%0d)", cyc, c_row, c_col));
        n_c++;
      end
      if (done) done_cyc = cyc;
    end
    check(n_toggle == nrb * nrb * nrb * NB, $sformatf("reg_load toggled %0d times", n_toggle));
    check(n_c == nrb * nrb * NB * NB, $sformatf("%0d results named", n_c));
    check(done_cyc == total, $sformatf("done at %0d, expected %0d", done_cyc, total));
    check(!busy, "still busy");
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst = 0;
    run_job(2);
    run_job(3);
    run_job(1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
