// syncnt -- SYNCNT: counts the asserted syndrome bits, one-hot.
//
// cnt[m] is high when exactly m of the N_IN inputs are high; with four inputs
// the outputs are ZERO, ONE, TWO, THREE and FOUR as in the original paper's
// four-input example. The structure mirrors that example's staircase: a
// one-hot level starts at ZERO and each input S_i in turn either passes it
// straight on (S_i low) or moves it up one level (S_i high). The decoder uses
// the count to tell zero, odd and even nonzero syndrome weights apart.
//
// The staircase is written at gate level rather than with the switches of the
// original; the default width is the original paper's four.
//
// Interface: s[N_IN-1:0] in, cnt[N_IN:0] out (exactly one bit set).
// Purely combinational.
module syncnt #(
  parameter int unsigned N_IN = 4
) (
  input  logic [N_IN-1:0] s,
  output logic [N_IN:0]   cnt
);

  // stage[i] is the one-hot count of s[i-1:0]
  logic [N_IN:0] stage [N_IN+1];

  assign stage[0] = (N_IN + 1)'(1);

  for (genvar i = 0; i < N_IN; i++) begin : g_stage
    assign stage[i+1] = s[i] ? (stage[i] << 1) : stage[i];
  end

  assign cnt = stage[N_IN];

endmodule
