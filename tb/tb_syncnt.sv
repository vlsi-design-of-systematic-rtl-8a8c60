// tb_syncnt -- exhaustive check of the one-hot bit counter at the default
// four inputs (ZERO..FOUR) and at eight inputs.
module tb_syncnt;
  logic [3:0] s4;
  logic [4:0] c4;
  logic [7:0] s8;
  logic [8:0] c8;
  int checks = 0, failures = 0;

  syncnt           dut4 (.s(s4), .cnt(c4));
  syncnt #(.N_IN(8)) dut8 (.s(s8), .cnt(c8));

  initial begin
    for (int v = 0; v < 16; v++) begin
      s4 = 4'(v);
      #1;
      checks++;
      if (c4 != (5'(1) << $countones(s4))) begin
        failures++;
        $display("FAIL s=%b cnt=%b", s4, c4);
      end
    end
    for (int v = 0; v < 256; v++) begin
      s8 = 8'(v);
      #1;
      checks++;
      if (c8 != (9'(1) << $countones(s8))) begin
        failures++;
        $display("FAIL s=%b cnt=%b", s8, c8);
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
