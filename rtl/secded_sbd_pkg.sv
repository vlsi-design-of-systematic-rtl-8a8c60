// secded_sbd_pkg -- shared constants and parity-check-matrix functions for the
// systematic odd-weight-column SEC-DED-SBD code of construction C1 (r = 2b).
//
// The code protects words organised in b-bit bytes. Its parity-check matrix H
// (r x n) is made of two modules M0 and M1 of K0+1 byte columns each:
//
//   H = [ H_1 .. H_K0  0_b   I_b .. I_b  I_b ]      rows 0 .. b-1
//       [ I_b .. I_b   I_b   H_1 .. H_K0 0_b ]      rows b .. 2b-1
//          <------ M0 ------> <------ M1 ------>
//
// with K0 = 2^(b-1) - 1. Each H_i is a b x b matrix whose b columns are all
// equal to the i-th nonzero even-weight b-tuple, so every data column has odd
// weight and every check column (the I_b under 0_b and the I_b over 0_b) has
// weight one. Byte K0 and byte 2*K0+1 of the codeword are the check bytes.
// For b = 4 this is the (64,56) code: 14 data bytes, 8 check bits.
//
// The two-module structure and the H_i / I_b layout follow the original
// paper. Design choices: the order in which H_1..H_K0 take the even-weight
// tuples is ascending numeric value (syndrome bit S_t is bit t of the tuple), and the
// odd-weight error patterns used by the bit decoders are listed by weight,
// then by value (single-bit patterns first, then triple-bit, ...).
//
// Everything here is a constant function used to elaborate fixed wiring and
// XOR trees; nothing is evaluated at run time. Functions support b up to 15.
package secded_sbd_pkg;

  localparam int unsigned MAX_R = 32;
  typedef logic [MAX_R-1:0] col_t;

  // Data bytes per module: the nonzero even-weight b-tuples.
  function automatic int unsigned k0_of(input int unsigned b);
    return (1 << (b - 1)) - 1;
  endfunction

  // Codeword length and data length of the full-length C1 code.
  function automatic int unsigned n_of(input int unsigned b);
    return 2 * b * (k0_of(b) + 1);
  endfunction

  function automatic int unsigned k_of(input int unsigned b);
    return n_of(b) - 2 * b;
  endfunction

  function automatic int unsigned weight(input col_t v);
    int unsigned w = 0;
    for (int unsigned t = 0; t < MAX_R; t++) w += v[t];
    return w;
  endfunction

  // i-th (1-based) nonzero even-weight b-tuple, ascending value: the common
  // column of H_i.
  function automatic col_t even_tuple(input int unsigned b, input int unsigned i);
    int unsigned cnt = 0;
    col_t v;
    for (int unsigned x = 1; x < (1 << b); x++) begin
      v = col_t'(x);
      if (weight(v) % 2 == 0) begin
        cnt++;
        if (cnt == i) return v;
      end
    end
    return '0;
  endfunction

  // p-th (0-based) odd-weight b-tuple, ordered by weight then by value.
  function automatic col_t odd_tuple(input int unsigned b, input int unsigned p);
    int unsigned cnt = 0;
    col_t v;
    for (int unsigned w = 1; w <= b; w += 2) begin
      for (int unsigned x = 1; x < (1 << b); x++) begin
        v = col_t'(x);
        if (weight(v) == w) begin
          if (cnt == p) return v;
          cnt++;
        end
      end
    end
    return '0;
  endfunction

  // Column c (0 .. n-1) of H, row t in bit t.
  function automatic col_t h_col(input int unsigned b, input int unsigned c);
    int unsigned k0   = k0_of(b);
    int unsigned byt  = c / b;
    int unsigned j    = c % b;
    col_t        unit = col_t'(1) << j;
    col_t        id;
    if (byt <= k0) begin                       // module M0
      id = (byt == k0) ? col_t'(0) : even_tuple(b, byt + 1);
      return id | (unit << b);
    end else begin                             // module M1
      id = (byt == 2 * k0 + 1) ? col_t'(0) : even_tuple(b, byt - k0);
      return unit | (id << b);
    end
  endfunction

  // Codeword position of data bit d (0 .. k-1): the data bytes of M0, then
  // those of M1, each skipping its module's check byte.
  function automatic int unsigned data_pos(input int unsigned b, input int unsigned d);
    return (d < b * k0_of(b)) ? d : d + b;
  endfunction

  // Codeword position of check bit t (0 .. 2b-1), the bit whose H column is
  // the unit vector of row t.
  function automatic int unsigned check_pos(input int unsigned b, input int unsigned t);
    return (t < b) ? (2 * k0_of(b) + 1) * b + t : k0_of(b) * b + (t - b);
  endfunction

endpackage
