// wl_thm2_run: testbench helper. Runs one random n x n product, n = R*NB, on
// a thm2_core (Theorem 2 off-chip design) from a memory modelled here, and
// compares every result and the cycle count. Reports on 'finished', 'checks'
// and 'failures'.
module wl_thm2_run #(
  parameter int NB = 2,
  parameter int R  = 3
) (
  input  logic clk,
  input  logic rst,
  output logic finished,
  output int   checks,
  output int   failures
);
  import mm_pkg::*;
  localparam int N = NB * R, IW = $clog2(N);
  logic start = 1'b0, busy, done, a_req, b_req, c_valid;
  logic [IW-1:0] a_row [R];
  logic [IW-1:0] b_col [R];
  logic [IW-1:0] c_col [R];
  logic [IW-1:0] a_col, b_row, c_row;
  din_t a_data [R];
  din_t b_data [R];
  acc_t c_data [R];
  int ma [N][N];
  int mb [N][N];
  acc_t mc [N][N];
  int cyc = 0;

  thm2_core #(.NB(NB), .R(R)) u_core (.*);

  always_ff @(posedge clk) begin
    cyc <= cyc + 1;
    for (int p = 0; p < R; p++) begin
      if (a_req) a_data[p] <= din_t'(ma[a_row[p]][a_col]);
      if (b_req) b_data[p] <= din_t'(mb[b_row][b_col[p]]);
      if (c_valid) mc[c_row][c_col[p]] <= c_data[p];
    end
  end

  initial begin
    int t0;
    finished = 0; checks = 0; failures = 0;
    for (int r = 0; r < N; r++)
      for (int c = 0; c < N; c++) begin
        ma[r][c] = int'($signed(8'($urandom)));
        mb[r][c] = int'($signed(8'($urandom)));
      end
    @(negedge clk);
    while (rst) @(negedge clk);
    start = 1; t0 = cyc;
    @(negedge clk) start = 0;
    while (!done) @(negedge clk);
    checks++;
    if (cyc - t0 != 2 * R * NB * NB + 3) begin
      failures++;
      $display("FAIL: n=%0d block %0d latency %0d", N, NB, cyc - t0);
    end
    @(negedge clk);
    for (int r = 0; r < N; r++)
      for (int c = 0; c < N; c++) begin
        int ref_v;
        ref_v = 0;
        for (int k = 0; k < N; k++) ref_v += ma[r][k] * mb[k][c];
        checks++;
        if (mc[r][c] != acc_t'(ref_v)) begin
          failures++;
          if (failures < 5) $display("FAIL: n=%0d block %0d C[%0d][%0d]", N, NB, r, c);
        end
      end
    $display("Theorem 2, n = %0d, block size %0d, r = %0d: %0d cycles, %0d checks, %0d failures",
             N, NB, R, 2 * R * NB * NB + 3, checks, failures);
    finished = 1;
  end
endmodule
