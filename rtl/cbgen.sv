// cbgen -- check bit generator of the C1 SEC-DED-SBD code.
//
// Computes the r = 2b check bits of a k-bit data word so that the codeword
// satisfies H X^T = 0. Check bit t lies on the unit column of row t, so it is
// the XOR of every data bit whose H column has a one in row t. For b = 4
// each check bit is the XOR of 28 data bits: four bits of each of the seven
// data bytes of the module that carries I_4 in that row, plus two bits' worth
// of bytes (H_i rows) from the other module.
//
// The XOR trees follow the original paper; the wiring comes from the matrix in
// secded_sbd_pkg, whose H_i order is this design's choice.
//
// Interface: data[K-1:0] in, check[R-1:0] out, data bit d sits at codeword
// position secded_sbd_pkg::data_pos(B, d). Purely combinational.
module cbgen
  import secded_sbd_pkg::*;
#(
  parameter  int unsigned B = 4,
  localparam int unsigned R = 2 * B,
  localparam int unsigned K = k_of(B)
) (
  input  logic [K-1:0] data,
  output logic [R-1:0] check
);

  // Row masks: bit d of ROW[t] is set when data bit d takes part in check t.
  logic [K-1:0] row_mask [R];

  for (genvar t = 0; t < R; t++) begin : g_row
    for (genvar d = 0; d < K; d++) begin : g_bit
      localparam col_t COL = h_col(B, data_pos(B, d));
      assign row_mask[t][d] = COL[t];
    end
    assign check[t] = ^(data & row_mask[t]);
  end

endmodule
