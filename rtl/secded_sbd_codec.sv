// secded_sbd_codec -- encoder and decoder of the systematic odd-weight-column
// SEC-DED-SBD code, construction C1 (r = 2b).
//
// With the default b = 4 this is a (64,56) code for memories organised in
// 4-bit bytes (one byte per chip or card). It corrects any single-bit error
// and any odd number of flipped bits within one byte (1 or 3 of 4), and it
// detects double-bit errors and an even number of flipped bits within one
// byte (2 or 4 of 4).
//
// Write side: cbgen computes the eight check bits from the 56 data bits and
// the codeword is assembled in the order of H: bytes 0..6 data, byte 7 check
// bits c4..c7, bytes 8..14 data, byte 15 check bits c0..c3.
// Read side: syngen computes the syndrome, syndrome_decoder produces the Bit
// Error Pointers and the error class, and errcorr flips the pointed bits; the
// corrected data and check bits are then taken back out of the codeword.
//
// The four blocks, the 2-modular matrix and the SYNDEC/SYNCNT split follow
// the original paper. Placing the codeword bits as in the matrix, purely
// combinational paths with no registers, and the three error flags are this
// design's choices.
//
// Interface (K = 56, R = 8, N = 64 for B = 4):
//   enc_data[K-1:0]   -> enc_check[R-1:0], enc_codeword[N-1:0]
//   dec_codeword[N-1:0] -> dec_syndrome[R-1:0], dec_bit_ptr[N-1:0],
//                          dec_corrected_cw[N-1:0], dec_data[K-1:0],
//                          dec_check[R-1:0], err_none, err_corrected,
//                          err_detected
// Both paths are combinational; there is no clock and no state. The code is
// systematic, so the data bits of enc_codeword are enc_data wired straight
// through; only the check bits are computed.
module secded_sbd_codec
  import secded_sbd_pkg::*;
#(
  parameter  int unsigned B = 4,
  localparam int unsigned R = 2 * B,
  localparam int unsigned N = n_of(B),
  localparam int unsigned K = k_of(B)
) (
  input  logic [K-1:0] enc_data,
  output logic [R-1:0] enc_check,
  output logic [N-1:0] enc_codeword,

  input  logic [N-1:0] dec_codeword,
  output logic [R-1:0] dec_syndrome,
  output logic [N-1:0] dec_bit_ptr,
  output logic [N-1:0] dec_corrected_cw,
  output logic [K-1:0] dec_data,
  output logic [R-1:0] dec_check,
  output logic         err_none,
  output logic         err_corrected,
  output logic         err_detected
);

  // ---------------- encoder ----------------
  cbgen #(.B(B)) u_cbgen (
    .data  (enc_data),
    .check (enc_check)
  );

  for (genvar d = 0; d < K; d++) begin : g_enc_data
    assign enc_codeword[data_pos(B, d)] = enc_data[d];
  end
  for (genvar t = 0; t < R; t++) begin : g_enc_check
    assign enc_codeword[check_pos(B, t)] = enc_check[t];
  end

  // ---------------- decoder ----------------
  syngen #(.B(B)) u_syngen (
    .cw  (dec_codeword),
    .syn (dec_syndrome)
  );

  syndrome_decoder #(.B(B)) u_syndrome_decoder (
    .syn           (dec_syndrome),
    .bit_ptr       (dec_bit_ptr),
    .err_none      (err_none),
    .err_corrected (err_corrected),
    .err_detected  (err_detected)
  );

  errcorr #(.N(N)) u_errcorr (
    .cw       (dec_codeword),
    .bit_ptr  (dec_bit_ptr),
    .cw_fixed (dec_corrected_cw)
  );

  for (genvar d = 0; d < K; d++) begin : g_dec_data
    assign dec_data[d] = dec_corrected_cw[data_pos(B, d)];
  end
  for (genvar t = 0; t < R; t++) begin : g_dec_check
    assign dec_check[t] = dec_corrected_cw[check_pos(B, t)];
  end

endmodule
