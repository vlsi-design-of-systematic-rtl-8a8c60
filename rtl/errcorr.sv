// errcorr -- error corrector.
//
// Flips every bit of the word read out of memory whose Bit Error Pointer is
// set: a bit-per-bit XOR, as in the original paper.
//
// Interface: cw[N-1:0], bit_ptr[N-1:0] in, cw_fixed[N-1:0] out.
// Purely combinational.
module errcorr #(
  parameter int unsigned N = 64
) (
  input  logic [N-1:0] cw,
  input  logic [N-1:0] bit_ptr,
  output logic [N-1:0] cw_fixed
);

  assign cw_fixed = cw ^ bit_ptr;

endmodule
