// tb_cbgen -- check bit generator against the reference encoder: walking ones
// (each data bit's own column) and random words.
module tb_cbgen;
  import tb_ref_pkg::*;

  logic [55:0] data;
  logic [7:0]  check;
  int checks = 0, failures = 0;

  cbgen dut (.data(data), .check(check));

  task automatic try(input logic [55:0] d);
    logic [63:0] cw;
    data = d;
    #1;
    cw = encode(d);
    checks++;
    if (check != {cw[31:28], cw[63:60]}) begin
      failures++;
      $display("FAIL data=%h check=%h expected=%h", d, check, {cw[31:28], cw[63:60]});
    end
  endtask

  initial begin
    try('0);
    for (int d = 0; d < 56; d++) try(56'(1) << d);
    for (int i = 0; i < 2000; i++) try(56'({$urandom, $urandom}));
    try('1);
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
