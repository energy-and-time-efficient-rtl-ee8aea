// mm_mac: the multiply-and-accumulate unit of a PE.
//
// Two pipeline stages, following the Mult and Acc stages of the PE pipeline:
//   Mult: when ce is high, the 8x8 signed product a*b is registered.
//   Acc : sum = (flush ? 0 : acc_in) + product register, combinational.
// acc_in is the intermediate value c'_ij read from Cbuf in the Acc cycle; the
// caller writes sum back into Cbuf. With flush high the stored value is
// ignored, which starts a new accumulation without clearing Cbuf. The product
// of two 8-bit signed words always fits 16 bits; the sum wraps modulo 2^16.
// Latency: a, b presented in cycle t give a product in cycle t+1 and the
// sum in cycle t+1 (same cycle as acc_in/flush).
module mm_mac
  import mm_pkg::*;
(
  input  logic clk,
  input  logic rst,
  input  logic ce,
  input  din_t a,
  input  din_t b,
  input  logic flush,
  input  acc_t acc_in,
  output acc_t sum
);
  acc_t prod_q;

  always_ff @(posedge clk)
    if (rst)     prod_q <= '0;
    else if (ce) prod_q <= acc_t'(a) * acc_t'(b);

  assign sum = (flush ? acc_t'(0) : acc_in) + prod_q;
endmodule
