// tb_thm2_onchip: test of the on-chip Theorem 2 design with block size
// NB = 3 and R = 2, n = 6.
//
// Each of three jobs loads fresh random signed 8-bit matrices A and B
// through the host port, in random order, and pulses start. The test waits
// for done, then reads all of C back and compares it with a product
// computed here with 16-bit wrap-around. Also checked:
// - done comes 2*R*NB^2 + 4 cycles after start;
// - busy is high during the job and low after it;
// - a start pulse while busy is ignored.
module tb_thm2_onchip;
  import mm_pkg::*;
  localparam int NB = 3, R = 2, N = NB * R;
  localparam int IW = $clog2(N);

  logic clk = 1'b0, rst = 1'b1;
  logic host_we = 1'b0, host_sel = 1'b0, host_c_re = 1'b0, start = 1'b0;
  logic [IW-1:0] host_row = '0, host_col = '0, host_c_row = '0, host_c_col = '0;
  din_t host_wdata = '0;
  acc_t host_c_rdata;
  logic busy, done;
  int checks = 0, failures = 0, cyc = 0;
  int ma [N][N];
  int mb [N][N];

  always #5 clk = ~clk;
  always_ff @(posedge clk) cyc <= cyc + 1;

  thm2_onchip #(.NB(NB), .R(R)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  task automatic load(input bit sel, input int r, input int c, input int v);
    host_we = 1'b1; host_sel = sel;
    host_row = IW'(r); host_col = IW'(c); host_wdata = din_t'(v);
    @(negedge clk);
    host_we = 1'b0;
  endtask

  task automatic run_job(input int job);
    int t0;
    acc_t ref_c;
    // random values, loaded column by column for A and row by row
    // backwards for B, so that the order of the writes does not matter
    for (int i = 0; i < N; i++)
      for (int j = 0; j < N; j++) begin
        ma[i][j] = int'($urandom_range(255)) - 128;
        mb[i][j] = int'($urandom_range(255)) - 128;
      end
    for (int j = 0; j < N; j++)
      for (int i = 0; i < N; i++) load(1'b0, i, j, ma[i][j]);
    for (int i = N - 1; i >= 0; i--)
      for (int j = 0; j < N; j++) load(1'b1, i, j, mb[i][j]);

    start = 1'b1; t0 = cyc;
    @(negedge clk) start = 1'b0;
    check(busy, $sformatf("job %0d: busy after start", job));
    repeat (5) @(negedge clk);
    // a second start in the middle of the job must be ignored
    start = 1'b1;
    @(negedge clk) start = 1'b0;
    while (!done) @(negedge clk);
    check(cyc - t0 == 2 * R * NB * NB + 4,
          $sformatf("job %0d: done after %0d cycles, expected %0d", job, cyc - t0, 2 * R * NB * NB + 4));
    @(negedge clk);
    check(!busy && !done, $sformatf("job %0d: idle after done", job));

    for (int i = 0; i < N; i++)
      for (int j = 0; j < N; j++) begin
        host_c_re = 1'b1; host_c_row = IW'(i); host_c_col = IW'(j);
        @(negedge clk);
        host_c_re = 1'b0;
        ref_c = '0;
        for (int k = 0; k < N; k++) ref_c += acc_t'(ma[i][k] * mb[k][j]);
        check(host_c_rdata == ref_c,
              $sformatf("job %0d: C[%0d][%0d] = %0d, expected %0d", job, i, j, host_c_rdata, ref_c));
      end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst = 1'b0;
    @(negedge clk);
    check(!busy && !done, "idle after reset");
    for (int job = 0; job < 3; job++) run_job(job);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
