// tb_bitdec -- bit decoder for b = 4. The pattern pointers are ordered
// single-bit (0001, 0010, 0100, 1000) then triple-bit (0111, 1011, 1101,
// 1110); every combination of byte pointer and pattern pointers is tried.
module tb_bitdec;
  localparam logic [3:0] PAT [8] = '{4'h1, 4'h2, 4'h4, 4'h8, 4'h7, 4'hB, 4'hD, 4'hE};

  logic       byte_ptr;
  logic [7:0] odd_ptr;
  logic [3:0] bit_ptr, expected;
  int checks = 0, failures = 0;

  bitdec dut (.byte_ptr(byte_ptr), .odd_ptr(odd_ptr), .bit_ptr(bit_ptr));

  initial begin
    for (int b = 0; b < 2; b++)
      for (int v = 0; v < 256; v++) begin
        byte_ptr = b[0];
        odd_ptr  = 8'(v);
        #1;
        expected = '0;
        if (byte_ptr) for (int p = 0; p < 8; p++) if (odd_ptr[p]) expected |= PAT[p];
        checks++;
        if (bit_ptr != expected) begin
          failures++;
          $display("FAIL byte=%b odd=%b bit_ptr=%b expected=%b", byte_ptr, odd_ptr, bit_ptr, expected);
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
