// tb_bch_decoder: feeds the BCH(127,64,10) decoder reference codewords with
// 0..10 random bit errors and checks that the message and codeword come back
// with the right error count, that 11..14 errors raise fail, and that a
// decode takes 276 clocks from start to done.
module tb_bch_decoder;
  import bch_tb_pkg::*;

  logic         clk = 1'b0;
  logic         rst_n = 1'b0;
  logic         start = 1'b0;
  logic [126:0] rx = '0;
  logic         busy, done, fail;
  logic [63:0]  msg;
  logic [126:0] corrected;
  logic [7:0]   nerr;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  bch_decoder dut (.clk, .rst_n, .start, .rx, .busy, .done, .msg, .corrected, .nerr, .fail);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic decode_one(input logic [63:0] m, input int ne);
    int cycles;
    logic [126:0] cw;
    cw = ref_encode(m);
    @(negedge clk);
    rx = cw ^ rand_errors(ne); start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    cycles = 1;
    while (!done) begin @(negedge clk); cycles++; end
    check(cycles == 276, $sformatf("latency %0d, expected 276", cycles));
    if (ne <= 10) begin
      check(!fail, $sformatf("fail raised with %0d errors", ne));
      check(msg == m, $sformatf("%0d errors: msg %h exp %h", ne, msg, m));
      check(corrected == cw, $sformatf("%0d errors: codeword mismatch", ne));
      check(int'(nerr) == ne, $sformatf("nerr %0d exp %0d", nerr, ne));
    end else begin
      check(fail, $sformatf("fail not raised with %0d errors", ne));
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int ne = 0; ne <= 10; ne++)
      for (int n = 0; n < 4; n++) decode_one(rand64(), ne);
    decode_one('1, 10);
    decode_one('0, 10);
    for (int ne = 11; ne <= 14; ne++)
      for (int n = 0; n < 3; n++) decode_one(rand64(), ne);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
