// tb_mm_mac: test of the multiply-and-accumulate unit.
//
// Random signed 8-bit operands, clock enable, flush and accumulator inputs.
// The product register must take a*b only on cycles with ce high, and the
// combinational sum must be (flush ? 0 : acc_in) + that product, modulo 2^16.
// Includes the corner case -128 x -128.
module tb_mm_mac;
  import mm_pkg::*;
  logic clk = 1'b0, rst = 1'b1, ce = 1'b0, flush = 1'b0;
  din_t a = '0, b = '0;
  acc_t acc_in = '0, sum;
  int checks = 0, failures = 0;
  int prod_ref = 0;

  always #5 clk = ~clk;

  mm_mac dut (.*);

  initial begin
    repeat (2) @(negedge clk);
    rst = 0;
    for (int t = 0; t < 400; t++) begin
      a = din_t'($urandom); b = din_t'($urandom); ce = ($urandom % 4) != 0;
      if (t == 5) begin a = -128; b = -128; ce = 1; end
      if (ce) prod_ref = int'(a) * int'(b);
      @(negedge clk);
      flush = $urandom % 2; acc_in = acc_t'($urandom);
      #1;
      checks++;
      if (sum != acc_t'((flush ? 0 : int'(acc_in)) + prod_ref)) begin
        failures++;
        if (failures < 10) $display("FAIL: t=%0d sum %0d expected %0d", t, sum,
                                    acc_t'((flush ? 0 : int'(acc_in)) + prod_ref));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
