// tb_toggle_noise: checks the reset phase of the aggressor flip-flops, that
// each one inverts on every clock while enabled, and that they hold while
// disabled.
module tb_toggle_noise;
  localparam int NP = 6, NF = 5;
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0;
  logic [NF-1:0] q [NP];
  logic [NF-1:0] prev [NP];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  toggle_noise #(.NUM_PUF(NP), .NUM_TFF(NF)) dut (.clk, .rst_n, .en, .q);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    for (int i = 0; i < NP; i++) check(q[i] == 5'b01010, $sformatf("reset phase %b", q[i]));
    rst_n = 1'b1;
    en = 1'b1;
    for (int c = 0; c < 20; c++) begin
      prev = q;
      @(negedge clk);
      for (int i = 0; i < NP; i++) check(q[i] == ~prev[i], $sformatf("bit %0d did not toggle", i));
    end
    en = 1'b0;
    for (int c = 0; c < 5; c++) begin
      prev = q;
      @(negedge clk);
      for (int i = 0; i < NP; i++) check(q[i] == prev[i], $sformatf("bit %0d toggled while disabled", i));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
