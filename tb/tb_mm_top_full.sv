// tb_mm_top_full: the on-chip design at its default size (block size 12,
// up to 4 blocks per dimension), running the three matrix sizes this
// hardware can hold: 48 x 48 (rb = 4), 12 x 12 (rb = 1) and 24 x 24 (rb = 2).
//
// Same procedure as tb_mm_top: random signed 8-bit A and B loaded through the
// host port, every element of C read back and compared with a product
// computed here (16-bit wrap-around), the start-to-done cycle count checked
// against rb^3*NB^2 + NB^2 + 3, and each array mechanism counted. The
// on-chip Theorem 2 design beside it, loaded and read back through its own
// host port, runs two jobs at its default 16 x 16 (block size 4, r = 4).
module tb_mm_top_full;
  import mm_pkg::*;
  localparam int unsigned NB = 12, RB_MAX = 4, N_MAX = NB * RB_MAX;
  localparam int unsigned IW = $clog2(N_MAX), RW = $clog2(RB_MAX + 1);

  localparam int unsigned T2_NB = 4, T2_R = 4, T2_N = T2_NB * T2_R, T2_IW = $clog2(T2_N);

  logic clk = 1'b0, rst = 1'b1;
  // Theorem 2 design ports
  logic t2_start = 1'b0, t2_busy, t2_done;
  logic t2_host_we = 1'b0, t2_host_sel = 1'b0, t2_host_c_re = 1'b0;
  logic [T2_IW-1:0] t2_host_row = '0, t2_host_col = '0, t2_host_c_row = '0, t2_host_c_col = '0;
  din_t t2_host_wdata = '0;
  acc_t t2_host_c_rdata;
  int t2a [T2_N][T2_N];
  int t2b [T2_N][T2_N];
  int t2_words = 0, n_hold = 0;
  logic host_we = 0, host_sel = 0, host_c_re = 0, start = 0;
  logic [IW-1:0] host_row = '0, host_col = '0, host_c_row = '0, host_c_col = '0;
  din_t host_wdata = '0;
  acc_t host_c_rdata;
  logic [RW-1:0] rb = RW'(1);
  logic busy, done;
  int checks = 0, failures = 0;
  int cyc = 0;
  int ma [N_MAX][N_MAX];
  int mb [N_MAX][N_MAX];

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  mm_top dut (.*);

  // result words leaving the Theorem 2 array, T2_R per cycle
  always @(posedge clk) if (dut.u_thm2.c_valid) t2_words <= t2_words + T2_R;
  always @(posedge clk)
    if (dut.u_thm2.c_valid && !dut.u_thm2.u_core.u_array.g_pe[0].u_pe.c2.out_mux &&
        dut.u_thm2.u_core.u_array.g_pe[0].u_pe.sq_act &&
        dut.u_thm2.u_core.u_array.g_pe[0].u_pe.sq_col == '0)
      n_hold++;


  // mechanism counters (PE_1 and PE_2 are watched)
  int n_bm = 0, n_bl = 0, n_flush = 0, n_acc_k = 0, n_direct = 0, n_fwd = 0, n_overlap = 0;
  always @(posedge clk) if (!rst) begin
    if (dut.u_core.u_array.g_pe[0].u_pe.ctrl_in.reg_load != dut.u_core.u_array.g_pe[0].u_pe.ld_prev) begin
      if (dut.u_core.u_array.g_pe[0].u_pe.ctrl_in.reg_load) n_bl++; else n_bm++;
    end
    if (dut.u_core.u_array.g_pe[0].u_pe.c2.ram_we &&  dut.u_core.u_array.g_pe[0].u_pe.c2.flush) n_flush++;
    if (dut.u_core.u_ctrl.a_act && dut.u_core.u_ctrl.ap.k != '0 && dut.u_core.u_ctrl.ap.kk == '0) n_acc_k++;
    if (dut.u_core.c_valid &&  dut.u_core.u_array.g_pe[0].u_pe.c2.out_mux) n_direct++;
    if (dut.u_core.c_valid && !dut.u_core.u_array.g_pe[0].u_pe.c2.out_mux) n_fwd++;
    if (dut.u_core.c_valid && dut.u_core.u_ctrl.a_act) n_overlap++;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  task automatic load_matrices();
    for (int r = 0; r < N_MAX; r++)
      for (int c = 0; c < N_MAX; c++) begin
        ma[r][c] = int'($signed(8'($urandom)));
        mb[r][c] = int'($signed(8'($urandom)));
      end
    for (int s = 0; s < 2; s++)
      for (int r = 0; r < N_MAX; r++)
        for (int c = 0; c < N_MAX; c++) begin
          @(negedge clk);
          host_we = 1; host_sel = s[0]; host_row = IW'(r); host_col = IW'(c);
          host_wdata = din_t'(s == 0 ? ma[r][c] : mb[r][c]);
        end
    @(negedge clk) host_we = 0;
  endtask

  task automatic run_job(input int nrb);
    int n, t0, lat, expl;
    n = nrb * NB;
    @(negedge clk);
    rb = RW'(nrb); start = 1;
    t0 = cyc;
    @(negedge clk) start = 0;
    while (!done) @(negedge clk);
    lat = cyc - t0;
    expl = nrb * nrb * nrb * NB * NB + NB * NB + 3;
    check(lat == expl, $sformatf("rb=%0d latency %0d, expected %0d", nrb, lat, expl));
    @(negedge clk);
    check(!busy, "busy after done");
    for (int r = 0; r < n; r++)
      for (int c = 0; c < n; c++) begin
        int ref_v;
        ref_v = 0;
        for (int k = 0; k < n; k++) ref_v += ma[r][k] * mb[k][c];
        host_c_re = 1; host_c_row = IW'(r); host_c_col = IW'(c);
        @(negedge clk);
        check(host_c_rdata == acc_t'(ref_v),
              $sformatf("rb=%0d C[%0d][%0d] = %0d, expected %0d", nrb, r, c, host_c_rdata, acc_t'(ref_v)));
      end
    host_c_re = 0;
  endtask

  // Theorem 2 design: one job, n = T2_N, checked element by element
  task automatic run_t2_job();
    int t0, t1;
    for (int r = 0; r < T2_N; r++)
      for (int c = 0; c < T2_N; c++) begin
        t2a[r][c] = int'($signed(8'($urandom)));
        t2b[r][c] = int'($signed(8'($urandom)));
      end
    // load A and B through the host port, one element per cycle
    @(negedge clk);
    for (int m = 0; m < 2; m++)
      for (int r = 0; r < T2_N; r++)
        for (int c = 0; c < T2_N; c++) begin
          t2_host_we = 1; t2_host_sel = (m == 1);
          t2_host_row = T2_IW'(r); t2_host_col = T2_IW'(c);
          t2_host_wdata = din_t'((m == 1) ? t2b[r][c] : t2a[r][c]);
          @(negedge clk);
        end
    t2_host_we = 0;
    t2_words = 0; t2_start = 1; t0 = cyc;
    @(negedge clk) t2_start = 0;
    while (!t2_done) @(negedge clk);
    t1 = cyc - t0;
    check(t1 == 2 * T2_R * T2_NB * T2_NB + 4, $sformatf("Theorem 2 latency %0d", t1));
    @(negedge clk);
    check(t2_words == T2_N * T2_N && !t2_busy, $sformatf("Theorem 2: %0d result words", t2_words));
    // read C back, one element per cycle
    for (int r = 0; r < T2_N; r++)
      for (int c = 0; c < T2_N; c++) begin
        int ref_v;
        t2_host_c_re = 1; t2_host_c_row = T2_IW'(r); t2_host_c_col = T2_IW'(c);
        @(negedge clk);
        t2_host_c_re = 0;
        ref_v = 0;
        for (int k = 0; k < T2_N; k++) ref_v += t2a[r][k] * t2b[k][c];
        check(t2_host_c_rdata == acc_t'(ref_v), $sformatf("Theorem 2 C[%0d][%0d] = %0d, expected %0d",
                                                           r, c, t2_host_c_rdata, acc_t'(ref_v)));
      end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
    load_matrices();
    run_job(4);
    load_matrices();
    run_job(1);
    run_job(2);
    run_t2_job();
    run_t2_job();
    check(n_hold > 0, "Theorem 2: no result parked in a hold buffer");
    check(n_bm > 0, "B never copied into BM");
    check(n_bl > 0, "B never copied into BL");
    check(n_flush > 0, "no flushed phase");
    check(n_acc_k > 0, "no accumulation across block products");
    check(n_direct > 0, "no result straight from the accumulator");
    check(n_fwd > 0, "no result forwarded through CObuf");
    check(n_overlap > 0, "output never overlapped with computation");
    $display("mechanisms: BM=%0d BL=%0d flush=%0d acc_k=%0d direct=%0d cobuf=%0d overlap=%0d t2_hold=%0d",
             n_bm, n_bl, n_flush, n_acc_k, n_direct, n_fwd, n_overlap, n_hold);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
