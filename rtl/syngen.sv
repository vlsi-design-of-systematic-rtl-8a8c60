// syngen -- syndrome generator of the C1 SEC-DED-SBD code.
//
// Computes S = H X^T for an n-bit word read out of memory: syndrome bit t is
// the XOR of every codeword bit whose H column has a one in row t, check bit
// t included. A zero syndrome means no detectable error. For b = 4 the 64-bit
// word yields S0..S7; S0..S3 are the rows where M0 carries H_i and M1 carries
// I_4, S4..S7 the reverse.
//
// XOR trees as in the original paper; the matrix (and the H_i order, a design
// choice) comes from secded_sbd_pkg.
//
// Interface: cw[N-1:0] in, syn[R-1:0] out. Purely combinational.
module syngen
  import secded_sbd_pkg::*;
#(
  parameter  int unsigned B = 4,
  localparam int unsigned R = 2 * B,
  localparam int unsigned N = n_of(B)
) (
  input  logic [N-1:0] cw,
  output logic [R-1:0] syn
);

  logic [N-1:0] row_mask [R];

  for (genvar t = 0; t < R; t++) begin : g_row
    for (genvar c = 0; c < N; c++) begin : g_bit
      localparam col_t COL = h_col(B, c);
      assign row_mask[t][c] = COL[t];
    end
    assign syn[t] = ^(cw & row_mask[t]);
  end

endmodule
