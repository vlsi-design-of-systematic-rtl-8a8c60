// tb_syndrome_decoder -- SYNDEC + SYNCNT for all 256 syndromes: pointers
// against the brute-force decoder, flags against the syndrome weight.
module tb_syndrome_decoder;
  import tb_ref_pkg::*;

  logic [7:0]  s;
  logic [63:0] bit_ptr;
  logic        none, corr, det;
  int checks = 0, failures = 0;
  int n_none = 0, n_corr = 0, n_det = 0;

  syndrome_decoder dut (.syn(s), .bit_ptr(bit_ptr), .err_none(none),
                        .err_corrected(corr), .err_detected(det));

  initial begin
    for (int v = 0; v < 256; v++) begin
      int w;
      s = 8'(v);
      #1;
      w = $countones(s);
      checks++;
      if (bit_ptr != ref_ptr(s)) begin
        failures++;
        $display("FAIL syn=%h ptr=%h", s, bit_ptr);
      end
      checks++;
      if ({none, corr, det} != {w == 0, w % 2 == 1, w != 0 && w % 2 == 0}) begin
        failures++;
        $display("FAIL syn=%h flags none=%b corr=%b det=%b", s, none, corr, det);
      end
      n_none += int'(none);
      n_corr += int'(corr);
      n_det  += int'(det);
    end
    // 1 zero syndrome, 128 odd, 127 even nonzero
    checks++;
    if (n_none != 1 || n_corr != 128 || n_det != 127) begin
      failures++;
      $display("FAIL flag totals %0d %0d %0d", n_none, n_corr, n_det);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
