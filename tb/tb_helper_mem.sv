// tb_helper_mem: writes random 127-bit words to every address, reads them
// back with the one-clock read latency, and checks that a read holds rdata.
module tb_helper_mem;
  localparam int NB = 4;
  logic clk = 1'b0, en = 1'b0, we = 1'b0;
  logic [1:0] addr = '0;
  logic [126:0] wdata = '0, rdata;
  logic [126:0] model [NB];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  helper_mem #(.N(127), .NUM_BLOCKS(NB)) dut (.clk, .en, .we, .addr, .wdata, .rdata);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    for (int round = 0; round < 5; round++) begin
      for (int a = 0; a < NB; a++) begin
        @(negedge clk);
        en = 1'b1; we = 1'b1; addr = 2'(a);
        wdata = {$urandom, $urandom, $urandom, $urandom};
        model[a] = wdata;
      end
      for (int a = NB - 1; a >= 0; a--) begin
        @(negedge clk);
        en = 1'b1; we = 1'b0; addr = 2'(a);
        @(negedge clk);
        en = 1'b0;
        check(rdata == model[a], $sformatf("addr %0d read %h exp %h", a, rdata, model[a]));
        @(negedge clk);
        check(rdata == model[a], "rdata did not hold");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
