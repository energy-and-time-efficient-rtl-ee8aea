// mm_pkg: word types and the PE control bundle shared by the matrix-multiply
// linear array.
//
// Inputs are 8-bit words and results are 16-bit words, as in the reference
// energy model (8-bit input precision, 16-bit output precision). Operands are
// read as two's-complement numbers; sums wrap modulo 2^16. Signedness and the
// wrap-around are choices of this implementation.
//
// ctrl_t carries the six control signals that the centralized control logic
// hands to the first PE and that every PE forwards to its right neighbour:
//   reg_load    (CtRegLoad)   level that toggles once per row of B. A PE that
//                             sees it change loads the word on its B input into
//                             BM (new level 0) or BL (new level 1). It travels
//                             with the B stream: two cycles per PE.
//   mux_to_mult (CtMuxToMult) 0: multiply A by BM, 1: multiply A by BL.
//   mult_ce     (CtMultCe)    the word on the A input is valid; clock enable of
//                             the multiplier stage.
//   ram_we      (CtRamWe)     write the accumulated sum into Cbuf.
//   flush       (CtFlush)     accumulate onto 0 instead of the Cbuf contents.
//   out_mux     (CtOutMux)    send the accumulator result to C_out instead of
//                             the CObuf word.
// All fields except reg_load are aligned with the A word on the PE input and
// travel with the A stream: one cycle per PE.
package mm_pkg;
  localparam int unsigned DW = 8;   // input word width
  localparam int unsigned CW = 16;  // product / accumulator / output width

  typedef logic signed [DW-1:0] din_t;
  typedef logic signed [CW-1:0] acc_t;

  typedef struct packed {
    logic reg_load;
    logic mux_to_mult;
    logic mult_ce;
    logic ram_we;
    logic flush;
    logic out_mux;
  } ctrl_t;

  localparam ctrl_t CTRL_IDLE = '0;
endpackage
