// tb_ref_pkg -- reference model of the (64,56) b = 4 code for the testbenches.
//
// Written independently of the RTL package: the parity-check matrix is given
// by an explicit table of the seven byte identifiers (the nonzero even-weight
// 4-tuples 0011, 0101, 0110, 1001, 1010, 1100, 1111 as values 3,5,6,9,10,12,15)
// and the decoder is a brute-force search over every byte and every odd
// error pattern, not a pointer decoder.
package tb_ref_pkg;

  localparam logic [3:0] IDS [7] = '{4'h3, 4'h5, 4'h6, 4'h9, 4'hA, 4'hC, 4'hF};

  // Column c of H: byte m = c/4 and bit j = c%4. Bytes 0..6: identifier on
  // rows 0..3, unit on rows 4..7; byte 7: check (unit on rows 4..7); bytes
  // 8..14: unit on rows 0..3, identifier on rows 4..7; byte 15: check (unit on
  // rows 0..3).
  function automatic logic [7:0] col(input int c);
    int m = c / 4;
    int j = c % 4;
    logic [3:0] u = 4'b0001 << j;
    if (m < 7)       return {u, IDS[m]};
    else if (m == 7) return {u, 4'h0};
    else if (m < 15) return {IDS[m-8], u};
    else             return {4'h0, u};
  endfunction

  function automatic logic [7:0] syn(input logic [63:0] cw);
    logic [7:0] s = '0;
    for (int c = 0; c < 64; c++) if (cw[c]) s ^= col(c);
    return s;
  endfunction

  function automatic int dpos(input int d);
    return (d < 28) ? d : d + 4;
  endfunction

  function automatic int cpos(input int t);
    return (t < 4) ? 60 + t : 28 + (t - 4);
  endfunction

  function automatic logic [63:0] encode(input logic [55:0] data);
    logic [63:0] cw = '0;
    logic [7:0]  s;
    for (int d = 0; d < 56; d++) cw[dpos(d)] = data[d];
    s = syn(cw);                                  // check columns are units
    for (int t = 0; t < 8; t++) cw[cpos(t)] = s[t];
    return cw;
  endfunction

  function automatic logic [55:0] extract(input logic [63:0] cw);
    logic [55:0] d;
    for (int i = 0; i < 56; i++) d[i] = cw[dpos(i)];
    return d;
  endfunction

  function automatic int popcount(input logic [63:0] v);
    int w = 0;
    for (int i = 0; i < 64; i++) w += v[i];
    return w;
  endfunction

  // Brute-force decoder: the error vector (odd number of bits in one byte)
  // whose syndrome equals s, or zero when there is none.
  function automatic logic [63:0] ref_ptr(input logic [7:0] s);
    logic [63:0] e;
    for (int m = 0; m < 16; m++)
      for (int p = 1; p < 16; p++) begin
        if (popcount(64'(p)) % 2 == 0) continue;
        e = 64'(p) << (4 * m);
        if (syn(e) == s) return e;
      end
    return '0;
  endfunction

endpackage
