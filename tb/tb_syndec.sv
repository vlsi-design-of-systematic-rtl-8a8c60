// tb_syndec -- SYNDEC for all 256 syndromes against the brute-force reference
// decoder, which searches every byte and odd error pattern for a match.
module tb_syndec;
  import tb_ref_pkg::*;

  logic [7:0]  s;
  logic [63:0] bit_ptr;
  int checks = 0, failures = 0;

  syndec dut (.syn(s), .bit_ptr(bit_ptr));

  initial begin
    for (int v = 0; v < 256; v++) begin
      s = 8'(v);
      #1;
      checks++;
      if (bit_ptr != ref_ptr(s)) begin
        failures++;
        $display("FAIL syn=%h ptr=%h expected=%h", s, bit_ptr, ref_ptr(s));
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
