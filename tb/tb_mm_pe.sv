// tb_mm_pe: test of one processing element (block size NB = 3) used as PE_1.
//
// The testbench drives two back-to-back 3x3 products the way the control
// logic would (B row by row, A column by column NB cycles later, reg_load
// toggling per B row) and feeds random words on C_in. It checks:
//   - column 1 of each product leaves C_out straight from the accumulator,
//     two cycles after the first A word of the last phase;
//   - at every other cycle C_out repeats C_in from NB-1 cycles earlier
//     (the CObuf path);
//   - A and B leave one cycle after they enter, reg_load two cycles after and
//     the other control signals one cycle after.
module tb_mm_pe;
  import mm_pkg::*;
  localparam int NB = 3, P = 2;
  localparam int STEPS = (P * NB + 1) * NB + NB * NB + 8;

  logic clk = 1'b0, rst = 1'b1;
  din_t a_in = '0, b_in = '0, a_out, b_out;
  ctrl_t ctrl_in = CTRL_IDLE, ctrl_out;
  acc_t c_in = '0, c_out;
  int checks = 0, failures = 0;
  int ma [P][NB][NB];
  int mb [P][NB][NB];
  acc_t  got [STEPS];
  acc_t  cin_h [STEPS];
  din_t  a_h [STEPS];
  din_t  b_h [STEPS];
  ctrl_t ct_h [STEPS];
  din_t  ao_h [STEPS];
  din_t  bo_h [STEPS];
  ctrl_t co_h [STEPS];
  bit    own [STEPS];

  always #5 clk = ~clk;

  mm_pe #(.NB(NB)) dut (.*);

  function automatic logic lvl(input int s);
    return logic'((s + 1) % 2);
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    int s, e;
    for (int p = 0; p < P; p++)
      for (int r = 0; r < NB; r++)
        for (int c = 0; c < NB; c++) begin
          ma[p][r][c] = int'($signed(8'($urandom)));
          mb[p][r][c] = int'($signed(8'($urandom)));
        end
    repeat (2) @(negedge clk);
    rst = 0;
    for (int t = 0; t < STEPS; t++) begin
      s = t / NB; e = t % NB;
      ctrl_in = CTRL_IDLE;
      ctrl_in.reg_load = lvl((s < P * NB) ? s : P * NB - 1);
      b_in = (s < P * NB) ? din_t'(mb[s / NB][s % NB][e]) : din_t'($urandom);
      a_in = din_t'($urandom);
      if (s >= 1 && s <= P * NB) begin
        int sp;
        sp = s - 1;
        a_in = din_t'(ma[sp / NB][e][sp % NB]);
        ctrl_in.mux_to_mult = lvl(sp);
        ctrl_in.mult_ce = 1; ctrl_in.ram_we = 1;
        ctrl_in.flush   = (sp % NB == 0);
        ctrl_in.out_mux = (sp % NB == NB - 1);
      end
      c_in = acc_t'($urandom);
      a_h[t] = a_in; b_h[t] = b_in; ct_h[t] = ctrl_in; cin_h[t] = c_in;
      @(negedge clk);
      got[t] = c_out; ao_h[t] = a_out; bo_h[t] = b_out; co_h[t] = ctrl_out;
    end
    // own column of each product
    for (int p = 0; p < P; p++) begin
      int t0;
      t0 = (p + 1) * NB * NB + 1;
      for (int i = 0; i < NB; i++) begin
        int ref_v;
        ref_v = 0;
        for (int k = 0; k < NB; k++) ref_v += ma[p][i][k] * mb[p][k][0];
        own[t0 + i] = 1;
        check(got[t0 + i] == acc_t'(ref_v),
              $sformatf("product %0d c[%0d][0] = %0d, expected %0d", p, i, got[t0 + i], acc_t'(ref_v)));
      end
    end
    // CObuf forwarding and systolic outputs
    for (int t = NB + 1; t < STEPS; t++) begin
      if (!own[t])
        check(got[t] == cin_h[t - NB + 2],
              $sformatf("step %0d: C_out %0d is not C_in of %0d cycles before", t, got[t], NB - 1));
      check(ao_h[t] == a_h[t] && bo_h[t] == b_h[t], $sformatf("step %0d: A/B not forwarded", t));
      check(co_h[t].reg_load == ct_h[t - 1].reg_load, $sformatf("step %0d: reg_load delay", t));
      check(co_h[t].mult_ce == ct_h[t].mult_ce && co_h[t].out_mux == ct_h[t].out_mux &&
            co_h[t].flush == ct_h[t].flush && co_h[t].mux_to_mult == ct_h[t].mux_to_mult &&
            co_h[t].ram_we == ct_h[t].ram_we, $sformatf("step %0d: control delay", t));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (STEPS + 100) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
