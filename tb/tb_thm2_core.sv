// tb_thm2_core: test of the off-chip Theorem 2 design with block size NB = 3
// and R = 2 (the two-port arrangement drawn for r = 2), n = 6.
//
// An external memory modelled here answers every request on the next cycle.
// Three jobs with fresh random signed 8-bit matrices are run; every result
// word on the R C ports is stored at the position the core names and the full
// C is compared with a product computed here. Also checked: the start-to-done
// cycle count (2*R*NB^2 + 3), the number of result words (n^2), and that each
// output source of the PEs was used (straight from the accumulator, from a
// hold buffer, forwarded through the delay line).
module tb_thm2_core;
  import mm_pkg::*;
  localparam int NB = 3, R = 2, N = NB * R;
  localparam int IW = $clog2(N);

  logic clk = 1'b0, rst = 1'b1, start = 1'b0;
  logic busy, done, a_req, b_req, c_valid;
  logic [IW-1:0] a_row [R];
  logic [IW-1:0] b_col [R];
  logic [IW-1:0] c_col [R];
  logic [IW-1:0] a_col, b_row, c_row;
  din_t a_data [R];
  din_t b_data [R];
  acc_t c_data [R];
  int checks = 0, failures = 0, cyc = 0, n_words = 0;
  int n_direct = 0, n_hold = 0, n_fwd = 0;
  int ma [N][N];
  int mb [N][N];
  acc_t mc [N][N];

  always #5 clk = ~clk;

  always_ff @(posedge clk) begin
    cyc <= cyc + 1;
    for (int p = 0; p < R; p++) begin
      if (a_req) a_data[p] <= din_t'(ma[a_row[p]][a_col]);
      if (b_req) b_data[p] <= din_t'(mb[b_row][b_col[p]]);
      if (c_valid) mc[c_row][c_col[p]] <= c_data[p];
    end
    if (c_valid) n_words <= n_words + R;
  end

  always @(posedge clk) if (c_valid) begin
    if (dut.u_array.g_pe[0].u_pe.c2.out_mux) n_direct++;
    else if (dut.u_array.g_pe[0].u_pe.sq_act && dut.u_array.g_pe[0].u_pe.sq_col == '0) n_hold++;
    else n_fwd++;
  end

  thm2_core #(.NB(NB), .R(R)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  task automatic run_job();
    int t0;
    for (int r = 0; r < N; r++)
      for (int c = 0; c < N; c++) begin
        ma[r][c] = int'($signed(8'($urandom)));
        mb[r][c] = int'($signed(8'($urandom)));
        mc[r][c] = '0;
      end
    @(negedge clk);
    n_words = 0;
    start = 1; t0 = cyc;
    @(negedge clk) start = 0;
    while (!done) @(negedge clk);
    check(cyc - t0 == 2 * R * NB * NB + 3, $sformatf("latency %0d", cyc - t0));
    @(negedge clk);
    check(n_words == N * N, $sformatf("%0d result words", n_words));
    for (int r = 0; r < N; r++)
      for (int c = 0; c < N; c++) begin
        int ref_v;
        ref_v = 0;
        for (int k = 0; k < N; k++) ref_v += ma[r][k] * mb[k][c];
        check(mc[r][c] == acc_t'(ref_v), $sformatf("C[%0d][%0d] = %0d, expected %0d", r, c, mc[r][c], acc_t'(ref_v)));
      end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst = 0;
    repeat (3) run_job();
    check(n_direct > 0, "no result straight from the accumulator");
    check(n_hold > 0, "no result from a hold buffer");
    check(n_fwd > 0, "no result forwarded through the delay line");
    $display("sources: direct=%0d hold=%0d forwarded=%0d", n_direct, n_hold, n_fwd);
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
