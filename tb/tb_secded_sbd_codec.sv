// tb_secded_sbd_codec -- end-to-end test of the (64,56) codec at its default
// size. Each trial encodes a random data word, checks the codeword against the
// reference encoder and its syndrome for zero, then injects one error class
// and checks syndrome, error flags and corrected data:
//   none                         -> err_none, data unchanged
//   single data bit              -> corrected
//   single check bit             -> corrected, data unchanged
//   three bits in one data byte  -> corrected (odd-bit-per-byte)
//   one or three bits in a check byte -> corrected
//   two bits in different bytes  -> err_detected (double-bit error)
//   two or four bits in one byte -> err_detected (even-bit-per-byte)
// Every class is counted and must occur. The paths are combinational; one
// vector is applied per 10 ns step.
module tb_secded_sbd_codec;
  import tb_ref_pkg::*;

  logic [55:0] enc_data, dec_data;
  logic [7:0]  enc_check, dec_syndrome, dec_check;
  logic [63:0] enc_codeword, dec_codeword, dec_bit_ptr, dec_corrected_cw;
  logic        err_none, err_corrected, err_detected;

  int checks = 0, failures = 0;
  typedef enum int {E_NONE, E_SINGLE_DATA, E_SINGLE_CHECK, E_TRIPLE_BYTE,
                    E_ODD_CHECK_BYTE, E_DOUBLE, E_EVEN_BYTE, E_NUM} err_e;
  int seen [E_NUM];

  secded_sbd_codec dut (.*);

  task automatic expect_true(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // a random data-byte index (0..6, 8..14) or check-byte index (7, 15)
  function automatic int data_byte();
    int m = $urandom_range(13);
    return (m < 7) ? m : m + 1;
  endfunction

  function automatic logic [63:0] pattern(input int m, input logic [3:0] p);
    return 64'(p) << (4 * m);
  endfunction

  function automatic logic [3:0] rand_weight(input int w);
    logic [3:0] p;
    do p = 4'($urandom); while ($countones(p) != w);
    return p;
  endfunction

  initial begin
    for (int i = 0; i < 4000; i++) begin
      logic [55:0] d;
      logic [63:0] e;
      err_e        kind;
      bit          want_corr, want_det;

      d        = 56'({$urandom, $urandom});
      kind     = err_e'(i % int'(E_NUM));
      enc_data = d;
      #5;
      expect_true(enc_codeword == encode(d), "codeword matches reference encoder");
      expect_true(syn(enc_codeword) == 8'h00, "codeword has zero syndrome");

      case (kind)
        E_NONE:           e = '0;
        E_SINGLE_DATA:    e = 64'(1) << dpos($urandom_range(55));
        E_SINGLE_CHECK:   e = 64'(1) << cpos($urandom_range(7));
        E_TRIPLE_BYTE:    e = pattern(data_byte(), rand_weight(3));
        E_ODD_CHECK_BYTE: e = pattern(($urandom_range(1) == 0) ? 7 : 15,
                                      rand_weight(($urandom_range(1) == 0) ? 1 : 3));
        E_DOUBLE: begin
          int a, b;
          a = int'($urandom_range(63));
          do b = int'($urandom_range(63)); while (b / 4 == a / 4);
          e = (64'(1) << a) | (64'(1) << b);
        end
        default:          e = pattern($urandom_range(15),
                                      rand_weight(($urandom_range(1) == 0) ? 2 : 4));
      endcase
      want_det  = (kind == E_DOUBLE) || (kind == E_EVEN_BYTE);
      want_corr = (kind != E_NONE) && !want_det;

      dec_codeword = enc_codeword ^ e;
      #5;
      expect_true(dec_syndrome == syn(e), "syndrome");
      expect_true(err_none == (kind == E_NONE), "err_none");
      expect_true(err_corrected == want_corr, "err_corrected");
      expect_true(err_detected == want_det, "err_detected");
      if (kind == E_NONE || want_corr) begin
        expect_true(dec_bit_ptr == e, "bit error pointers equal the injected error");
        expect_true(dec_corrected_cw == enc_codeword, "corrected codeword");
        expect_true(dec_data == d, "corrected data");
        expect_true(dec_check == enc_check, "corrected check bits");
      end else begin
        expect_true(dec_bit_ptr == '0, "no correction on a detected error");
      end
      // count the class when the codec reacted to it as specified
      if ((kind == E_NONE && err_none) || (want_corr && err_corrected) ||
          (want_det && err_detected)) seen[kind]++;
    end

    for (int k = 0; k < int'(E_NUM); k++) begin
      $display("error class %s: %0d", err_e'(k), seen[k]);
      expect_true(seen[k] > 0, "every error class exercised");
    end
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
