// syndrome_decoder -- SYNDEC plus SYNCNT.
//
// SYNDEC turns the syndrome into Bit Error Pointers for single-bit and
// odd-bit-per-byte errors. Two SYNCNT blocks, one per syndrome half (b inputs
// each, four for b = 4), count its asserted bits; the sum of the two counts
// classifies the word:
//   err_none      syndrome weight 0: no error;
//   err_corrected odd weight: an odd number of bits flipped, which the code
//                 corrects when they all lie in one byte;
//   err_detected  even nonzero weight: a double-bit error or an even number of
//                 bits flipped in one byte, detected but not corrected.
// Every data column of H has odd weight and every check column weight one, so
// an odd number of flipped bits always gives an odd-weight syndrome. In
// construction C1 every odd-weight syndrome matches one byte identifier and
// one odd pattern, so an odd syndrome always yields a correction; an odd
// number of errors spread over several bytes is outside the code's guarantee.
//
// The split into SYNDEC and SYNCNT follows the original paper; the flag encoding and
// the per-half use of SYNCNT are this design's choices.
//
// Interface: syn[R-1:0] in; bit_ptr[N-1:0], err_none, err_corrected,
// err_detected out (exactly one flag set). Purely combinational.
module syndrome_decoder
  import secded_sbd_pkg::*;
#(
  parameter  int unsigned B = 4,
  localparam int unsigned R = 2 * B,
  localparam int unsigned N = n_of(B)
) (
  input  logic [R-1:0] syn,
  output logic [N-1:0] bit_ptr,
  output logic         err_none,
  output logic         err_corrected,
  output logic         err_detected
);

  logic [B:0] cnt_lo, cnt_hi;    // one-hot weight of S0..S(b-1), S(b)..S(2b-1)
  logic       odd_lo, odd_hi;

  syndec #(.B(B)) u_syndec (
    .syn     (syn),
    .bit_ptr (bit_ptr)
  );

  syncnt #(.N_IN(B)) u_syncnt_lo (
    .s   (syn[B-1:0]),
    .cnt (cnt_lo)
  );

  syncnt #(.N_IN(B)) u_syncnt_hi (
    .s   (syn[R-1:B]),
    .cnt (cnt_hi)
  );

  always_comb begin
    odd_lo = 1'b0;
    odd_hi = 1'b0;
    for (int unsigned m = 1; m <= B; m += 2) begin
      odd_lo |= cnt_lo[m];
      odd_hi |= cnt_hi[m];
    end
    err_none      = cnt_lo[0] & cnt_hi[0];
    err_corrected = odd_lo ^ odd_hi;
    err_detected  = ~err_none & ~err_corrected;
  end

endmodule
