// tb_syngen -- syndrome generator against the reference matrix: every single
// column, valid codewords (zero syndrome) and random words.
module tb_syngen;
  import tb_ref_pkg::*;

  logic [63:0] cw;
  logic [7:0]  s;
  int checks = 0, failures = 0;

  syngen dut (.cw(cw), .syn(s));

  task automatic try(input logic [63:0] w, input logic [7:0] expected);
    cw = w;
    #1;
    checks++;
    if (s != expected) begin
      failures++;
      $display("FAIL cw=%h syn=%h expected=%h", w, s, expected);
    end
  endtask

  initial begin
    for (int c = 0; c < 64; c++) try(64'(1) << c, col(c));
    for (int i = 0; i < 500; i++) try(encode(56'({$urandom, $urandom})), 8'h00);
    for (int i = 0; i < 1000; i++) begin
      logic [63:0] w = {$urandom, $urandom};
      try(w, syn(w));
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
