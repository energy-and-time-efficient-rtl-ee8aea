// tb_mm_core: test of the off-chip design (NB = 4, RB_MAX = 2).
//
// The matrices sit in an external memory modelled here that answers each
// request on the next cycle, as the core expects. Jobs with rb = 2 (8 x 8)
// and rb = 1 (4 x 4) are run; every result word on the C port is stored at
// the position the core names, and the full C is compared with a product
// computed here. The start-to-done cycle count and the number of result
// words are checked too.
module tb_mm_core;
  import mm_pkg::*;
  localparam int NB = 4, RB_MAX = 2, N_MAX = NB * RB_MAX;
  localparam int IW = $clog2(N_MAX), RW = $clog2(RB_MAX + 1);

  logic clk = 1'b0, rst = 1'b1, start = 1'b0;
  logic [RW-1:0] rb = '0;
  logic busy, done, a_req, b_req, c_valid;
  logic [IW-1:0] a_row, a_col, b_row, b_col, c_row, c_col;
  din_t a_data, b_data;
  acc_t c_data;
  int checks = 0, failures = 0, cyc = 0, n_words = 0;
  int ma [N_MAX][N_MAX];
  int mb [N_MAX][N_MAX];
  acc_t mc [N_MAX][N_MAX];

  always #5 clk = ~clk;

  // external memory, one cycle read latency
  always_ff @(posedge clk) begin
    cyc <= cyc + 1;
    if (a_req) a_data <= din_t'(ma[a_row][a_col]);
    if (b_req) b_data <= din_t'(mb[b_row][b_col]);
    if (c_valid) begin
      mc[c_row][c_col] <= c_data;
      n_words <= n_words + 1;
    end
  end

  mm_core #(.NB(NB), .RB_MAX(RB_MAX)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  task automatic run_job(input int nrb);
    int n, t0;
    n = nrb * NB;
    for (int r = 0; r < N_MAX; r++)
      for (int c = 0; c < N_MAX; c++) begin
        ma[r][c] = int'($signed(8'($urandom)));
        mb[r][c] = int'($signed(8'($urandom)));
        mc[r][c] = '0;
      end
    @(negedge clk);
    n_words = 0;
    rb = RW'(nrb); start = 1; t0 = cyc;
    @(negedge clk) start = 0;
    while (!done) @(negedge clk);
    check(cyc - t0 == nrb * nrb * nrb * NB * NB + NB * NB + 3, $sformatf("latency %0d", cyc - t0));
    @(negedge clk);
    check(n_words == n * n, $sformatf("%0d result words", n_words));
    for (int r = 0; r < n; r++)
      for (int c = 0; c < n; c++) begin
        int ref_v;
        ref_v = 0;
        for (int k = 0; k < n; k++) ref_v += ma[r][k] * mb[k][c];
        check(mc[r][c] == acc_t'(ref_v), $sformatf("rb=%0d C[%0d][%0d] = %0d, expected %0d",
                                                    nrb, r, c, mc[r][c], acc_t'(ref_v)));
      end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst = 0;
    run_job(2);
    run_job(1);
    run_job(2);
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
