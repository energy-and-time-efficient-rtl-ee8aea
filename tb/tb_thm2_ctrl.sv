// tb_thm2_ctrl: test of the Theorem 2 control logic (NB = 2, R = 3), two jobs.
//
// The request streams are compared with sequences enumerated here: B rows of
// stages k = 1..R, one word per cycle from the cycle after start, and the A
// columns of the same stage exactly NB cycles later, with no gap between
// stages. The registered control word is checked against the previous
// cycle's A request (mult_ce, ram_we, flush on the first column of stage 1,
// out_mux on the last column of stage R) and reg_load must toggle once per B
// row. The result naming must run over R blocks in column-major order,
// starting three cycles after the first A request of the final phase, and
// done must pulse 2*R*NB^2 + 3 cycles after start.
module tb_thm2_ctrl;
  import mm_pkg::*;
  localparam int NB = 2, R = 3, N = NB * R;
  localparam int IW = $clog2(N), EW = $clog2(NB);

  logic clk = 1'b0, rst = 1'b1, start = 1'b0;
  logic busy, done, a_req, b_req, c_valid;
  logic [EW-1:0] a_e, b_e, c_j;
  logic [IW-1:0] a_col, b_row, c_row;
  ctrl_t ctrl;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  thm2_ctrl #(.NB(NB), .R(R)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  task automatic run_job();
    int words, total, n_b, n_a, n_c, n_toggle, first_final, done_cyc;
    int b_r[$], b_ee[$], a_ee[$], a_c[$], c_r[$], c_jj[$], a_first[$], a_last[$];
    logic prev_lvl, a_req_q, a_first_q, a_last_q;
    for (int k = 0; k < R; k++)
      for (int kk = 0; kk < NB; kk++)
        for (int e = 0; e < NB; e++) begin
          b_r.push_back(k * NB + kk); b_ee.push_back(e);
          a_ee.push_back(e); a_c.push_back(k * NB + kk);
          a_first.push_back(int'(k == 0 && kk == 0)); a_last.push_back(int'(k == R - 1 && kk == NB - 1));
        end
    for (int x = 0; x < R; x++)
      for (int j = 0; j < NB; j++)
        for (int i = 0; i < NB; i++) begin
          c_r.push_back(x * NB + i); c_jj.push_back(j);
        end
    words = b_r.size();
    total = 2 * R * NB * NB + 3;
    @(negedge clk);
    start = 1;
    prev_lvl = ctrl.reg_load;
    n_b = 0; n_a = 0; n_c = 0; n_toggle = 0; first_final = -1; done_cyc = -1;
    a_req_q = 0; a_first_q = 0; a_last_q = 0;
    for (int cyc = 1; cyc <= total + 4; cyc++) begin
      @(negedge clk);
      start = 0;
      check(ctrl.mult_ce == a_req_q && ctrl.ram_we == a_req_q, $sformatf("cyc %0d: mult_ce", cyc));
      check(ctrl.flush == (a_req_q && a_first_q), $sformatf("cyc %0d: flush", cyc));
      check(ctrl.out_mux == (a_req_q && a_last_q), $sformatf("cyc %0d: out_mux", cyc));
      if (ctrl.reg_load != prev_lvl) n_toggle++;
      prev_lvl = ctrl.reg_load;
      a_req_q = a_req; a_first_q = 0; a_last_q = 0;
      check(b_req == (cyc <= words), $sformatf("cyc %0d: b_req", cyc));
      if (b_req && n_b < words) begin
        check(b_row == IW'(b_r[n_b]) && b_e == EW'(b_ee[n_b]), $sformatf("cyc %0d: B address", cyc));
        n_b++;
      end
      check(a_req == (cyc > NB && cyc <= words + NB), $sformatf("cyc %0d: a_req", cyc));
      if (a_req && n_a < words) begin
        check(a_col == IW'(a_c[n_a]) && a_e == EW'(a_ee[n_a]), $sformatf("cyc %0d: A address", cyc));
        a_first_q = logic'(a_first[n_a]); a_last_q = logic'(a_last[n_a]);
        if (a_last[n_a] && first_final < 0) first_final = cyc;
        n_a++;
      end
      if (c_valid) begin
        if (n_c == 0) check(cyc == first_final + 3, $sformatf("first result at %0d", cyc));
        check(n_c < c_r.size() && c_row == IW'(c_r[n_c]) && c_j == EW'(c_jj[n_c]),
              $sformatf("cyc %0d: C position", cyc));
        n_c++;
      end
      if (done) done_cyc = cyc;
    end
    check(n_toggle == R * NB, $sformatf("reg_load toggled %0d times", n_toggle));
    check(n_c == R * NB * NB, $sformatf("%0d result cycles", n_c));
    check(done_cyc == total, $sformatf("done at %0d, expected %0d", done_cyc, total));
    check(!busy, "still busy");
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst = 0;
    run_job();
    run_job();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
