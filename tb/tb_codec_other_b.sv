// tb_codec_other_b -- the codec at byte lengths b = 3 (24,18) and b = 5
// (160,150), checked through properties that hold for every C1 code rather
// than a reference matrix:
//   a fresh codeword decodes with a zero syndrome and returns its data;
//   flipping an odd number of bits inside any one byte is corrected;
//   flipping an even number of bits inside one byte, or one bit in each of
//   two bytes, is flagged as detected and nothing is corrected.
// Each case is counted and must occur.
module tb_codec_other_b;
  int checks = 0, failures = 0;
  int n_clean = 0, n_odd = 0, n_even = 0, n_double = 0;

  task automatic expect_true(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // ---------------- b = 3 ----------------
  localparam int B3 = 3, N3 = 24, K3 = 18, R3 = 6;
  logic [K3-1:0] d3, q3;
  logic [N3-1:0] cw3, rx3, ptr3, fix3;
  logic [R3-1:0] c3, s3, qc3;
  logic          none3, corr3, det3;

  secded_sbd_codec #(.B(B3)) u_b3 (
    .enc_data(d3), .enc_check(c3), .enc_codeword(cw3),
    .dec_codeword(rx3), .dec_syndrome(s3), .dec_bit_ptr(ptr3),
    .dec_corrected_cw(fix3), .dec_data(q3), .dec_check(qc3),
    .err_none(none3), .err_corrected(corr3), .err_detected(det3));

  // ---------------- b = 5 ----------------
  localparam int B5 = 5, N5 = 160, K5 = 150, R5 = 10;
  logic [K5-1:0] d5, q5;
  logic [N5-1:0] cw5, rx5, ptr5, fix5;
  logic [R5-1:0] c5, s5, qc5;
  logic          none5, corr5, det5;

  secded_sbd_codec #(.B(B5)) u_b5 (
    .enc_data(d5), .enc_check(c5), .enc_codeword(cw5),
    .dec_codeword(rx5), .dec_syndrome(s5), .dec_bit_ptr(ptr5),
    .dec_corrected_cw(fix5), .dec_data(q5), .dec_check(qc5),
    .err_none(none5), .err_corrected(corr5), .err_detected(det5));

  // random b-bit pattern with odd (want_odd) or even nonzero weight
  function automatic logic [7:0] rand_pat(input int b, input bit want_odd);
    logic [7:0] p;
    do p = 8'($urandom_range((1 << b) - 1));
    while (p == 0 || ($countones(p) % 2 == 1) != want_odd);
    return p;
  endfunction

  initial begin
    for (int i = 0; i < 3000; i++) begin
      int kind, m3, m5, a, b;
      logic [N3-1:0] e3;
      logic [N5-1:0] e5;
      kind = i % 4;
      d3 = K3'($urandom);
      d5 = K5'({$urandom, $urandom, $urandom, $urandom, $urandom});
      #5;
      m3 = int'($urandom_range(N3 / B3 - 1));
      m5 = int'($urandom_range(N5 / B5 - 1));
      case (kind)
        0: begin e3 = '0; e5 = '0; end
        1: begin
          e3 = N3'(rand_pat(B3, 1'b1)) << (B3 * m3);
          e5 = N5'(rand_pat(B5, 1'b1)) << (B5 * m5);
        end
        2: begin
          e3 = N3'(rand_pat(B3, 1'b0)) << (B3 * m3);
          e5 = N5'(rand_pat(B5, 1'b0)) << (B5 * m5);
        end
        default: begin
          a = int'($urandom_range(N3 - 1));
          do b = int'($urandom_range(N3 - 1)); while (b / B3 == a / B3);
          e3 = (N3'(1) << a) | (N3'(1) << b);
          a = int'($urandom_range(N5 - 1));
          do b = int'($urandom_range(N5 - 1)); while (b / B5 == a / B5);
          e5 = (N5'(1) << a) | (N5'(1) << b);
        end
      endcase
      rx3 = cw3 ^ e3;
      rx5 = cw5 ^ e5;
      #5;
      case (kind)
        0: begin
          expect_true(none3 && s3 == '0 && q3 == d3 && qc3 == c3, "b=3 clean word");
          expect_true(none5 && s5 == '0 && q5 == d5 && qc5 == c5, "b=5 clean word");
          n_clean += int'(none3 && none5);
        end
        1: begin
          expect_true(corr3 && ptr3 == e3 && fix3 == cw3 && q3 == d3, "b=3 odd-bit-per-byte corrected");
          expect_true(corr5 && ptr5 == e5 && fix5 == cw5 && q5 == d5, "b=5 odd-bit-per-byte corrected");
          n_odd += int'(corr3 && corr5);
        end
        2: begin
          expect_true(det3 && !corr3 && ptr3 == '0, "b=3 even-bit-per-byte detected");
          expect_true(det5 && !corr5 && ptr5 == '0, "b=5 even-bit-per-byte detected");
          n_even += int'(det3 && det5);
        end
        default: begin
          expect_true(det3 && !corr3 && ptr3 == '0, "b=3 double error detected");
          expect_true(det5 && !corr5 && ptr5 == '0, "b=5 double error detected");
          n_double += int'(det3 && det5);
        end
      endcase
    end
    $display("clean %0d, odd-in-byte corrected %0d, even-in-byte detected %0d, double detected %0d",
             n_clean, n_odd, n_even, n_double);
    expect_true(n_clean > 0 && n_odd > 0 && n_even > 0 && n_double > 0, "every case exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
