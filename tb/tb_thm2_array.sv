// tb_thm2_array: test of the Theorem 2 array on its own (NB = 3, R = 2).
//
// The testbench plays the control logic for two back-to-back jobs (no gap
// between them): in stage k it feeds B_k1..B_kR row by row on the R B ports
// and A_1k..A_Rk column by column, NB cycles later, on the R A ports, with the
// six control signals. Port y must then deliver C_1y, ..., C_Ry in column-major
// order, one word per cycle, starting two cycles after the first A word of the
// final phase entered PE_1; every word is compared with a product computed
// here.
module tb_thm2_array;
  import mm_pkg::*;
  localparam int NB = 3, R = 2, N = NB * R, J = 2;
  localparam int SLOTS = J * R * NB;
  localparam int STEPS = (SLOTS + 1) * NB + R * NB * NB + 8;

  logic clk = 1'b0, rst = 1'b1;
  din_t a_in [R];
  din_t b_in [R];
  ctrl_t ctrl_in = CTRL_IDLE;
  acc_t c_out [R];
  int checks = 0, failures = 0;
  int ma [J][N][N];
  int mb [J][N][N];
  acc_t got [STEPS][R];

  always #5 clk = ~clk;

  thm2_array #(.NB(NB), .R(R)) dut (.*);

  function automatic logic lvl(input int s);
    return logic'((s + 1) % 2);
  endfunction

  initial begin
    int s, e;
    for (int q = 0; q < J; q++)
      for (int r = 0; r < N; r++)
        for (int c = 0; c < N; c++) begin
          ma[q][r][c] = int'($signed(8'($urandom)));
          mb[q][r][c] = int'($signed(8'($urandom)));
        end
    a_in = '{default: '0}; b_in = '{default: '0};
    repeat (2) @(negedge clk);
    rst = 0;
    for (int t = 0; t < STEPS; t++) begin
      s = t / NB; e = t % NB;
      ctrl_in = CTRL_IDLE;
      ctrl_in.reg_load = lvl((s < SLOTS) ? s : SLOTS - 1);
      for (int p = 0; p < R; p++) begin
        b_in[p] = '0; a_in[p] = '0;
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
      @(negedge clk);
      for (int p = 0; p < R; p++) got[t][p] = c_out[p];
    end
    for (int q = 0; q < J; q++) begin
      int t0;
      t0 = (q + 1) * R * NB * NB + 1;
      for (int m = 0; m < R * NB * NB; m++)
        for (int y = 0; y < R; y++) begin
          int x, i, j, ref_v;
          x = m / (NB * NB); i = m % NB; j = (m / NB) % NB; ref_v = 0;
          for (int k = 0; k < N; k++) ref_v += ma[q][x * NB + i][k] * mb[q][k][y * NB + j];
          checks++;
          if (got[t0 + m][y] != acc_t'(ref_v)) begin
            failures++;
            if (failures < 10) $display("FAIL: job %0d port %0d C[%0d][%0d] = %0d, expected %0d",
                                        q, y, x * NB + i, y * NB + j, got[t0 + m][y], acc_t'(ref_v));
          end
        end
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
