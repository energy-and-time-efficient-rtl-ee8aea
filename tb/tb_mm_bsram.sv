// tb_mm_bsram: test of the on-chip block memory with DEPTH = 100, W = 16.
//
// Random writes and reads against a shadow copy; read data must appear one
// cycle after the read address and hold while re is low.
module tb_mm_bsram;
  localparam int DEPTH = 100, W = 16, AW = $clog2(DEPTH);
  logic clk = 1'b0, we = 1'b0, re = 1'b0;
  logic [AW-1:0] waddr = '0, raddr = '0;
  logic [W-1:0] wdata = '0, rdata;
  logic [W-1:0] shadow [DEPTH];
  logic [W-1:0] expect_q;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  mm_bsram #(.DEPTH(DEPTH), .W(W)) dut (.*);

  initial begin
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk);
      we = 1; waddr = AW'(i); wdata = W'($urandom); shadow[i] = wdata;
    end
    @(negedge clk);
    we = 0;
    re = 1; raddr = '0; expect_q = shadow[0];
    for (int t = 0; t < 600; t++) begin
      @(negedge clk);
      checks++;
      if (rdata != expect_q) begin
        failures++;
        if (failures < 10) $display("FAIL: t=%0d got %h expected %h", t, rdata, expect_q);
      end
      // next: random write to a different address, random read
      re = $urandom % 3 != 0;
      raddr = AW'($urandom % DEPTH);
      we = $urandom % 2; waddr = AW'($urandom % DEPTH); wdata = W'($urandom);
      if (we && waddr == raddr) we = 0;
      if (re) expect_q = shadow[raddr];
      if (we) shadow[waddr] = wdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
