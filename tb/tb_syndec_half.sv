// tb_syndec_half -- one SYNDEC instance, all 256 (s_id, s_pat) pairs. A byte
// is pointed at when s_id equals its identifier (0 for the check byte, last)
// and s_pat has odd weight; its pointers then equal s_pat.
module tb_syndec_half;
  import tb_ref_pkg::IDS;

  logic [3:0]  s_id, s_pat;
  logic [31:0] bit_ptr, expected;
  int checks = 0, failures = 0;

  syndec_half dut (.s_id(s_id), .s_pat(s_pat), .bit_ptr(bit_ptr));

  initial begin
    for (int a = 0; a < 16; a++)
      for (int p = 0; p < 16; p++) begin
        s_id  = 4'(a);
        s_pat = 4'(p);
        #1;
        expected = '0;
        if ($countones(s_pat) % 2 == 1) begin
          for (int m = 0; m < 7; m++) if (s_id == IDS[m]) expected[m*4 +: 4] = s_pat;
          if (s_id == 4'h0) expected[28 +: 4] = s_pat;
        end
        checks++;
        if (bit_ptr != expected) begin
          failures++;
          $display("FAIL id=%h pat=%h ptr=%h expected=%h", s_id, s_pat, bit_ptr, expected);
        end
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
