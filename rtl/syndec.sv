// syndec -- SYNDEC: Bit Error Pointers for the whole codeword.
//
// H is 2-modular: the upper syndrome half identifies the byte and the lower
// half carries the error pattern in module M0, and the roles swap in M1. So
// SYNDEC is two copies of the same block: I0 sees (S0..S3, S4..S7) and drives
// pointers 0..N/2-1, I1 sees (S4..S7, S0..S3) and drives N/2..N-1 (b = 4).
// Since at most one module can match a given syndrome, at most one byte has
// pointers set, and they point at exactly the bits of an odd-weight error
// confined to that byte.
//
// Structure as in the original paper.
//
// Interface: syn[R-1:0] in, bit_ptr[N-1:0] out. Purely combinational.
module syndec
  import secded_sbd_pkg::*;
#(
  parameter  int unsigned B = 4,
  localparam int unsigned R = 2 * B,
  localparam int unsigned N = n_of(B)
) (
  input  logic [R-1:0] syn,
  output logic [N-1:0] bit_ptr
);

  syndec_half #(.B(B)) u_i0 (
    .s_id    (syn[B-1:0]),
    .s_pat   (syn[R-1:B]),
    .bit_ptr (bit_ptr[N/2-1:0])
  );

  syndec_half #(.B(B)) u_i1 (
    .s_id    (syn[R-1:B]),
    .s_pat   (syn[B-1:0]),
    .bit_ptr (bit_ptr[N-1:N/2])
  );

endmodule
