// tb_thm2_pe: test of one Theorem 2 processing element (NB = 3, R = 2) used
// as PE_1.
//
// The testbench drives two back-to-back jobs the way the control logic would
// and feeds random words on the R C_in ports. It checks:
//   - on port y, column 1 of C_1y leaves straight from MAC_1y two cycles after
//     the first A word of the final phase, and column 1 of C_xy (x >= 2)
//     leaves from the hold buffer (x-1)*NB^2 cycles later;
//   - at every other cycle port y repeats C_in[y] from NB-1 cycles earlier;
//   - A and B leave one cycle after they enter and reg_load two cycles after.
module tb_thm2_pe;
  import mm_pkg::*;
  localparam int NB = 3, R = 2, N = NB * R, J = 2;
  localparam int SLOTS = J * R * NB;
  localparam int STEPS = (SLOTS + 1) * NB + R * NB * NB + 8;

  logic clk = 1'b0, rst = 1'b1;
  din_t a_in [R];
  din_t b_in [R];
  din_t a_out [R];
  din_t b_out [R];
  ctrl_t ctrl_in = CTRL_IDLE, ctrl_out;
  acc_t c_in [R];
  acc_t c_out [R];
  int checks = 0, failures = 0;
  int ma [J][N][N];
  int mb [J][N][N];
  acc_t got [STEPS][R];
  acc_t cin_h [STEPS][R];
  din_t a_h [STEPS][R];
  din_t b_h [STEPS][R];
  din_t ao_h [STEPS][R];
  din_t bo_h [STEPS][R];
  logic ld_h [STEPS];
  logic ldo_h [STEPS];
  bit own [STEPS];

  always #5 clk = ~clk;

  thm2_pe #(.NB(NB), .R(R)) dut (.*);

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
    for (int q = 0; q < J; q++)
      for (int r = 0; r < N; r++)
        for (int c = 0; c < N; c++) begin
          ma[q][r][c] = int'($signed(8'($urandom)));
          mb[q][r][c] = int'($signed(8'($urandom)));
        end
    a_in = '{default: '0}; b_in = '{default: '0}; c_in = '{default: '0};
    repeat (2) @(negedge clk);
    rst = 0;
    for (int t = 0; t < STEPS; t++) begin
      s = t / NB; e = t % NB;
      ctrl_in = CTRL_IDLE;
      ctrl_in.reg_load = lvl((s < SLOTS) ? s : SLOTS - 1);
      for (int p = 0; p < R; p++) begin
        b_in[p] = din_t'($urandom); a_in[p] = din_t'($urandom); c_in[p] = acc_t'($urandom);
      end
      if (s < SLOTS) begin
        int q, k, kk;
        q = s / (R * NB); k = (s / NB) % R; kk = s % NB;
        for (int y = 0; y < R; y++) b_in[y] = din_t'(mb[q][k * NB + kk][y * NB + e]);
      end
      if (s >= 1 && s <= SLOTS) begin
        int sp, q, k, kk;
        sp = s - 1; q = sp / (R * NB); k = (sp / NB) % R; kk = sp % NB;
        for (int x = 0; x < R; x++) a_in[x] = din_t'(ma[q][x * NB + e][k * NB + kk]);
        ctrl_in.mux_to_mult = lvl(sp);
        ctrl_in.mult_ce = 1; ctrl_in.ram_we = 1;
        ctrl_in.flush   = (k == 0 && kk == 0);
        ctrl_in.out_mux = (k == R - 1 && kk == NB - 1);
      end
      for (int p = 0; p < R; p++) begin
        a_h[t][p] = a_in[p]; b_h[t][p] = b_in[p]; cin_h[t][p] = c_in[p];
      end
      ld_h[t] = ctrl_in.reg_load;
      @(negedge clk);
      for (int p = 0; p < R; p++) begin
        got[t][p] = c_out[p]; ao_h[t][p] = a_out[p]; bo_h[t][p] = b_out[p];
      end
      ldo_h[t] = ctrl_out.reg_load;
    end
    for (int q = 0; q < J; q++) begin
      int t0;
      t0 = (q + 1) * R * NB * NB + 1;
      for (int x = 0; x < R; x++)
        for (int i = 0; i < NB; i++) begin
          own[t0 + x * NB * NB + i] = 1;
          for (int y = 0; y < R; y++) begin
            int ref_v;
            ref_v = 0;
            for (int k = 0; k < N; k++) ref_v += ma[q][x * NB + i][k] * mb[q][k][y * NB];
            check(got[t0 + x * NB * NB + i][y] == acc_t'(ref_v),
                  $sformatf("job %0d port %0d C[%0d][%0d] = %0d, expected %0d", q, y, x * NB + i,
                            y * NB, got[t0 + x * NB * NB + i][y], acc_t'(ref_v)));
          end
        end
    end
    for (int t = NB + 1; t < STEPS; t++) begin
      for (int p = 0; p < R; p++) begin
        if (!own[t])
          check(got[t][p] == cin_h[t - NB + 2][p], $sformatf("step %0d port %0d: not forwarded", t, p));
        check(ao_h[t][p] == a_h[t][p] && bo_h[t][p] == b_h[t][p], $sformatf("step %0d: A/B not forwarded", t));
      end
      check(ldo_h[t] == ld_h[t - 1], $sformatf("step %0d: reg_load delay", t));
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
