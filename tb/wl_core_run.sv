// wl_core_run: testbench helper. Runs JOBS random n x n products, n = RB*NB,
// one after the other on an mm_core (Corollary 1 off-chip design) built with
// block size NB, from a memory modelled here, and compares every result and
// the cycle count of each job.
// Reports its result on 'finished', 'checks' and 'failures'.
module wl_core_run #(
  parameter int NB = 3,
  parameter int RB = 1,
  parameter int JOBS = 1
) (
  input  logic clk,
  input  logic rst,
  output logic finished,
  output int   checks,
  output int   failures
);
  import mm_pkg::*;
  localparam int N_MAX = NB * RB, IW = (N_MAX > 1) ? $clog2(N_MAX) : 1, RW = $clog2(RB + 1);
  logic start = 1'b0, busy, done, a_req, b_req, c_valid;
  logic [RW-1:0] rb = RW'(RB);
  logic [IW-1:0] a_row, a_col, b_row, b_col, c_row, c_col;
  din_t a_data, b_data;
  acc_t c_data;
  int ma [N_MAX][N_MAX];
  int mb [N_MAX][N_MAX];
  acc_t mc [N_MAX][N_MAX];
  int cyc = 0;

  mm_core #(.NB(NB), .RB_MAX(RB)) u_core (.*);

  always_ff @(posedge clk) begin
    cyc <= cyc + 1;
    if (a_req) a_data <= din_t'(ma[a_row][a_col]);
    if (b_req) b_data <= din_t'(mb[b_row][b_col]);
    if (c_valid) mc[c_row][c_col] <= c_data;
  end

  initial begin
    int t0;
    finished = 0; checks = 0; failures = 0;
    @(negedge clk);
    while (rst) @(negedge clk);
    for (int job = 0; job < JOBS; job++) begin
      for (int r = 0; r < N_MAX; r++)
        for (int c = 0; c < N_MAX; c++) begin
          ma[r][c] = int'($signed(8'($urandom)));
          mb[r][c] = int'($signed(8'($urandom)));
        end
      start = 1; t0 = cyc;
      @(negedge clk) start = 0;
      while (!done) @(negedge clk);
      checks++;
      if (cyc - t0 != RB * RB * RB * NB * NB + NB * NB + 3) begin
        failures++;
        $display("FAIL: n=%0d block %0d latency %0d", N_MAX, NB, cyc - t0);
      end
      @(negedge clk);
      for (int r = 0; r < N_MAX; r++)
        for (int c = 0; c < N_MAX; c++) begin
          int ref_v;
          ref_v = 0;
          for (int k = 0; k < N_MAX; k++) ref_v += ma[r][k] * mb[k][c];
          checks++;
          if (mc[r][c] != acc_t'(ref_v)) begin
            failures++;
            if (failures < 5) $display("FAIL: n=%0d block %0d job %0d C[%0d][%0d]", N_MAX, NB, job, r, c);
          end
        end
    end
    $display("Corollary 1, n = %0d, block size %0d, %0d jobs: %0d cycles each, %0d checks, %0d failures",
             N_MAX, NB, JOBS, RB * RB * RB * NB * NB + NB * NB + 3, checks, failures);
    finished = 1;
  end
endmodule
