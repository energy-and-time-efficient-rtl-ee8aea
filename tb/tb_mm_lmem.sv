// tb_mm_lmem: test of the local memory (Cbuf/CObuf) with DEPTH = 12.
//
// Random writes and reads against a shadow copy. The read port is
// asynchronous: a word written at a clock edge must be readable in the next
// cycle, and a cycle without write enable must leave the contents alone.
module tb_mm_lmem;
  localparam int DEPTH = 12, W = 16, AW = $clog2(DEPTH);
  logic clk = 1'b0, we = 1'b0;
  logic [AW-1:0] waddr = '0, raddr = '0;
  logic [W-1:0] wdata = '0, rdata;
  logic [W-1:0] shadow [DEPTH];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  mm_lmem #(.DEPTH(DEPTH), .W(W)) dut (.*);

  initial begin
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk);
      we = 1; waddr = AW'(i); wdata = W'($urandom); shadow[i] = wdata;
    end
    for (int t = 0; t < 500; t++) begin
      @(negedge clk);
      // the word written at the last edge, then a random one
      raddr = waddr;
      #1;
      checks++;
      if (rdata != shadow[raddr]) begin
        failures++;
        if (failures < 10) $display("FAIL: read-after-write addr %0d got %h expected %h", raddr, rdata, shadow[raddr]);
      end
      raddr = AW'($urandom % DEPTH);
      #1;
      checks++;
      if (rdata != shadow[raddr]) begin
        failures++;
        if (failures < 10) $display("FAIL: addr %0d got %h expected %h", raddr, rdata, shadow[raddr]);
      end
      we = $urandom % 2; waddr = AW'($urandom % DEPTH); wdata = W'($urandom);
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
