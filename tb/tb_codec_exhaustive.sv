// tb_codec_exhaustive -- exhaustive error-pattern test of the default (64,56)
// codec on a fixed set of data words. For each word it injects:
//   every single-bit error (64)                      -> corrected
//   every odd pattern in every byte (16 x 8, the singles again plus all
//   triple-bit-per-byte errors)                      -> corrected
//   every even nonzero pattern in every byte (16 x 7) -> detected
//   every pair of bits in different bytes (1920)     -> detected
// and checks that corrections restore data and check bits exactly and that
// detected errors leave all Bit Error Pointers clear.
module tb_codec_exhaustive;
  logic [55:0] enc_data, dec_data;
  logic [7:0]  enc_check, dec_syndrome, dec_check;
  logic [63:0] enc_codeword, dec_codeword, dec_bit_ptr, dec_corrected_cw;
  logic        err_none, err_corrected, err_detected;

  int checks = 0, failures = 0;
  int n_single = 0, n_odd_byte = 0, n_even_byte = 0, n_double = 0;

  secded_sbd_codec dut (.*);

  task automatic apply(input logic [63:0] e, input bit want_corr);
    logic [63:0] cw;
    cw = enc_codeword;
    dec_codeword = cw ^ e;
    #1;
    checks++;
    if (want_corr) begin
      if (!(err_corrected && !err_none && !err_detected && dec_bit_ptr == e &&
            dec_corrected_cw == cw && dec_data == enc_data && dec_check == enc_check)) begin
        failures++;
        $display("FAIL correct e=%h syn=%h ptr=%h", e, dec_syndrome, dec_bit_ptr);
      end
    end else begin
      if (!(err_detected && !err_none && !err_corrected && dec_bit_ptr == '0)) begin
        failures++;
        $display("FAIL detect e=%h syn=%h ptr=%h", e, dec_syndrome, dec_bit_ptr);
      end
    end
  endtask

  initial begin
    for (int w = 0; w < 4; w++) begin
      case (w)
        0: enc_data = '0;
        1: enc_data = '1;
        2: enc_data = 56'h5A_A5C3_3C96_6901;
        default: enc_data = 56'({$urandom, $urandom});
      endcase
      #1;
      dec_codeword = enc_codeword;
      #1;
      checks++;
      if (!(err_none && dec_syndrome == '0 && dec_data == enc_data)) begin
        failures++;
        $display("FAIL clean word %h", enc_data);
      end
      for (int c = 0; c < 64; c++) begin
        apply(64'(1) << c, 1'b1);
        n_single++;
      end
      for (int m = 0; m < 16; m++)
        for (int p = 1; p < 16; p++) begin
          if ($countones(4'(p)) % 2 == 1) begin
            apply(64'(p) << (4 * m), 1'b1);
            n_odd_byte++;
          end else begin
            apply(64'(p) << (4 * m), 1'b0);
            n_even_byte++;
          end
        end
      for (int a = 0; a < 64; a++)
        for (int b = a + 1; b < 64; b++)
          if (a / 4 != b / 4) begin
            apply((64'(1) << a) | (64'(1) << b), 1'b0);
            n_double++;
          end
    end
    $display("single %0d, odd-in-byte %0d, even-in-byte %0d, double %0d",
             n_single, n_odd_byte, n_even_byte, n_double);
    checks++;
    if (n_single != 4 * 64 || n_odd_byte != 4 * 128 || n_even_byte != 4 * 112 ||
        n_double != 4 * 1920) begin
      failures++;
      $display("FAIL pattern counts");
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
