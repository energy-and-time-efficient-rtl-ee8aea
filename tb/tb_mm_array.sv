// tb_mm_array: test of the linear array of NB = 4 PEs on its own.
//
// The testbench plays the control logic: it feeds B of P = 3 products row by
// row and A column by column, NB cycles behind, with no gap between products,
// and drives the six control signals (reg_load toggling once per B row,
// mux_to_mult following it one row later, flush on the first phase and
// out_mux on the last phase of each product). Each product's NB^2 results must
// leave C_out of PE_1 in column-major order, one per cycle, starting two
// cycles after the first A word of the last phase entered PE_1; they are
// compared with products computed here.
module tb_mm_array;
  import mm_pkg::*;
  localparam int NB = 4, P = 3;
  localparam int STEPS = (P * NB + 1) * NB + NB * NB + 8;

  logic clk = 1'b0, rst = 1'b1;
  din_t a_in = '0, b_in = '0;
  ctrl_t ctrl_in = CTRL_IDLE;
  acc_t c_out;
  int checks = 0, failures = 0;
  int ma [P][NB][NB];
  int mb [P][NB][NB];
  acc_t got [STEPS];

  always #5 clk = ~clk;

  mm_array #(.NB(NB)) dut (.*);

  function automatic logic lvl(input int s);
    return logic'((s + 1) % 2);
  endfunction

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
      b_in = (s < P * NB) ? din_t'(mb[s / NB][s % NB][e]) : '0;
      a_in = '0;
      if (s >= 1 && s <= P * NB) begin
        int sp;
        sp = s - 1;
        a_in = din_t'(ma[sp / NB][e][sp % NB]);
        ctrl_in.mux_to_mult = lvl(sp);
        ctrl_in.mult_ce = 1; ctrl_in.ram_we = 1;
        ctrl_in.flush   = (sp % NB == 0);
        ctrl_in.out_mux = (sp % NB == NB - 1);
      end
      @(negedge clk);
      got[t] = c_out;   // c_out during the cycle after step t was sampled
    end
    for (int p = 0; p < P; p++) begin
      int t0;
      t0 = (p + 1) * NB * NB + 1;
      for (int m = 0; m < NB * NB; m++) begin
        int i, j, ref_v;
        i = m % NB; j = m / NB; ref_v = 0;
        for (int k = 0; k < NB; k++) ref_v += ma[p][i][k] * mb[p][k][j];
        checks++;
        if (got[t0 + m] != acc_t'(ref_v)) begin
          failures++;
          if (failures < 10) $display("FAIL: product %0d C[%0d][%0d] = %0d, expected %0d",
                                      p, i, j, got[t0 + m], acc_t'(ref_v));
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
