// tb_errcorr -- error corrector: pointed bits flip, the others pass.
module tb_errcorr;
  logic [63:0] cw, ptr, fixed;
  int checks = 0, failures = 0;

  errcorr dut (.cw(cw), .bit_ptr(ptr), .cw_fixed(fixed));

  initial begin
    for (int i = 0; i < 1000; i++) begin
      cw  = {$urandom, $urandom};
      ptr = (i < 64) ? 64'(1) << i : {$urandom, $urandom};
      #1;
      for (int b = 0; b < 64; b++) begin
        checks++;
        if (fixed[b] != (ptr[b] ? ~cw[b] : cw[b])) begin
          failures++;
          $display("FAIL bit %0d cw=%h ptr=%h out=%h", b, cw, ptr, fixed);
        end
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
