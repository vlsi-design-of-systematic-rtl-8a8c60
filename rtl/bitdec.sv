// bitdec -- BITDEC: Bit Error Pointers of one byte.
//
// Bit j of the byte is in error when the byte's Byte Error Pointer is set and
// the syndrome's error-pattern half equals one of the odd-weight b-tuples that
// contain bit j. The pattern half has already been decoded into one pointer
// per odd-weight pattern (odd_ptr), so bit j is byte_ptr AND the OR of the
// pattern pointers whose pattern has bit j set. For b = 4 that is four
// pointers per bit: its single-bit pattern and the three triple-bit patterns
// that include it. The same cell is used for every data and check byte.
//
// The document names the cell and its inputs; the AND-OR form here is this
// design's own. Pattern order is that of secded_sbd_pkg::odd_tuple
// (single-bit patterns first, then triple-bit, ...).
//
// Interface: byte_ptr, odd_ptr[2^(B-1)-1:0] in, bit_ptr[B-1:0] out.
// Purely combinational.
module bitdec
  import secded_sbd_pkg::*;
#(
  parameter  int unsigned B  = 4,
  localparam int unsigned NP = 1 << (B - 1)
) (
  input  logic          byte_ptr,
  input  logic [NP-1:0] odd_ptr,
  output logic [B-1:0]  bit_ptr
);

  for (genvar j = 0; j < B; j++) begin : g_bit
    logic [NP-1:0] sel;
    for (genvar p = 0; p < NP; p++) begin : g_pat
      localparam col_t PAT = odd_tuple(B, p);
      assign sel[p] = PAT[j];
    end
    assign bit_ptr[j] = byte_ptr & |(odd_ptr & sel);
  end

endmodule
