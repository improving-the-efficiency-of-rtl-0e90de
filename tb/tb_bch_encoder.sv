// tb_bch_encoder: checks the BCH(127,64,10) encoder against a whole-word
// polynomial division, checks that every codeword has alpha^1..alpha^20 as
// roots, and checks the 66-clock latency from start to done.
module tb_bch_encoder;
  import bch_tb_pkg::*;

  logic         clk = 1'b0;
  logic         rst_n = 1'b0;
  logic         start = 1'b0;
  logic [63:0]  msg = '0;
  logic         busy, done;
  logic [126:0] codeword;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  bch_encoder dut (.clk, .rst_n, .start, .msg, .busy, .done, .codeword);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic encode_one(input logic [63:0] m);
    int cycles;
    logic [126:0] exp_cw;
    @(negedge clk);
    msg = m; start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    cycles = 1;
    while (!done) begin @(negedge clk); cycles++; end
    exp_cw = ref_encode(m);
    check(codeword == exp_cw, $sformatf("codeword for %h: got %h exp %h", m, codeword, exp_cw));
    check(cycles == 66, $sformatf("latency %0d, expected 66", cycles));
    for (int j = 1; j <= 20; j++)
      check(ref_synd(codeword, j) == 7'd0, $sformatf("S%0d nonzero for %h", j, m));
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    encode_one(64'd0);
    encode_one(64'd1);
    encode_one(64'h8000_0000_0000_0000);
    encode_one('1);
    for (int n = 0; n < 20; n++) encode_one(rand64());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
