// tb_workloads: every configuration of the document's result tables, each
// built at its own block size and run on random matrices.
//   Corollary 1 (off- and on-chip tables): 3x3 (block 3, 50 pairs of random
//     matrices, as in the energy-spread experiment), 6x6 (block 6),
//     12x12 (block 12), 15x15 (block 15), 24x24 and 48x48 (block 12).
//   Theorem 2 table: 6x6 (block 2), 8x8 (block 2), 12x12 (blocks 2, 3, 4),
//     16x16 (blocks 2, 4).
// Every other size runs once. Each job checks all n^2 results and its cycle
// count.
module tb_workloads;
  logic clk = 1'b0, rst = 1'b1;
  localparam int NC = 6, NT = 7;
  logic fin [NC + NT];
  int   chk [NC + NT];
  int   fl  [NC + NT];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  wl_core_run #(.NB(3),  .RB(1), .JOBS(50)) u_c0 (.clk, .rst, .finished (fin[0]), .checks (chk[0]), .failures (fl[0]));
  wl_core_run #(.NB(6),  .RB(1)) u_c1 (.clk, .rst, .finished (fin[1]), .checks (chk[1]), .failures (fl[1]));
  wl_core_run #(.NB(12), .RB(1)) u_c2 (.clk, .rst, .finished (fin[2]), .checks (chk[2]), .failures (fl[2]));
  wl_core_run #(.NB(15), .RB(1)) u_c3 (.clk, .rst, .finished (fin[3]), .checks (chk[3]), .failures (fl[3]));
  wl_core_run #(.NB(12), .RB(2)) u_c4 (.clk, .rst, .finished (fin[4]), .checks (chk[4]), .failures (fl[4]));
  wl_core_run #(.NB(12), .RB(4)) u_c5 (.clk, .rst, .finished (fin[5]), .checks (chk[5]), .failures (fl[5]));
  wl_thm2_run #(.NB(2), .R(3)) u_t0 (.clk, .rst, .finished (fin[6]),  .checks (chk[6]),  .failures (fl[6]));
  wl_thm2_run #(.NB(2), .R(4)) u_t1 (.clk, .rst, .finished (fin[7]),  .checks (chk[7]),  .failures (fl[7]));
  wl_thm2_run #(.NB(2), .R(6)) u_t2 (.clk, .rst, .finished (fin[8]),  .checks (chk[8]),  .failures (fl[8]));
  wl_thm2_run #(.NB(3), .R(4)) u_t3 (.clk, .rst, .finished (fin[9]),  .checks (chk[9]),  .failures (fl[9]));
  wl_thm2_run #(.NB(4), .R(3)) u_t4 (.clk, .rst, .finished (fin[10]), .checks (chk[10]), .failures (fl[10]));
  wl_thm2_run #(.NB(2), .R(8)) u_t5 (.clk, .rst, .finished (fin[11]), .checks (chk[11]), .failures (fl[11]));
  wl_thm2_run #(.NB(4), .R(4)) u_t6 (.clk, .rst, .finished (fin[12]), .checks (chk[12]), .failures (fl[12]));

  initial begin
    bit all;
    repeat (3) @(negedge clk);
    rst = 0;
    do begin
      @(negedge clk);
      all = 1;
      foreach (fin[i]) if (!fin[i]) all = 0;
    end while (!all);
    foreach (fin[i]) begin
      checks += chk[i];
      failures += fl[i];
    end
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
