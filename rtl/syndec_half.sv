// syndec_half -- one instance (I0 or I1) of the SYNDEC block.
//
// Decodes the Bit Error Pointers of one module of H (K0 data bytes plus one
// check byte, 32 bits for b = 4). In module M0 a fault that flips an odd
// number of bits of byte i leaves syndrome rows 0..b-1 equal to the byte's
// identifier (the even-weight column of H_i, or zero for the check byte) and
// rows b..2b-1 equal to the error pattern itself. So:
//   * K0+1 Byte Error Pointers compare s_id with each identifier;
//   * 2^(b-1) pattern pointers compare s_pat with each odd-weight pattern
//     (for b = 4: four Single-bit and four Triple-bit-per-byte pointers);
//   * one BITDEC per byte combines them into that byte's Bit Error Pointers.
// Module M1 is the mirror image, so the same block serves as I1 with the two
// syndrome halves swapped at its inputs.
//
// The split into byte, single-bit and triple-bit pointers and the BITDEC cells
// follow the original paper; the identifier order comes from secded_sbd_pkg.
//
// Interface: s_id[B-1:0], s_pat[B-1:0] in; bit_ptr[(K0+1)*B-1:0] out, byte m
// of the module in bits m*B +: B, the check byte last. Purely combinational.
module syndec_half
  import secded_sbd_pkg::*;
#(
  parameter  int unsigned B  = 4,
  localparam int unsigned K0 = k0_of(B),
  localparam int unsigned NP = 1 << (B - 1),
  localparam int unsigned NH = (K0 + 1) * B
) (
  input  logic [B-1:0]  s_id,
  input  logic [B-1:0]  s_pat,
  output logic [NH-1:0] bit_ptr
);

  logic [K0:0]   byte_ptr;   // Byte Error Pointers
  logic [NP-1:0] odd_ptr;    // Single-bit, Triple-bit-per-byte, ... pointers

  for (genvar i = 0; i <= K0; i++) begin : g_byte
    localparam col_t ID = (i == K0) ? col_t'(0) : even_tuple(B, i + 1);
    assign byte_ptr[i] = (s_id == ID[B-1:0]);

    bitdec #(.B(B)) u_bitdec (
      .byte_ptr (byte_ptr[i]),
      .odd_ptr  (odd_ptr),
      .bit_ptr  (bit_ptr[i*B +: B])
    );
  end

  for (genvar p = 0; p < NP; p++) begin : g_pat
    localparam col_t PAT = odd_tuple(B, p);
    assign odd_ptr[p] = (s_pat == PAT[B-1:0]);
  end

endmodule
