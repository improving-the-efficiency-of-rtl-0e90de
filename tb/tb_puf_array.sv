// tb_puf_array: two 32-cell PUF banks modelling two chips with the same
// placement. Checks the evaluation latency, that stable sites read the bit
// their skew predicts, that the two chips differ in roughly half their bits,
// and that moving cells to other sites (a different placement) changes the
// reading as predicted.
module tb_puf_array;
  import puf_tb_pkg::*;

  localparam int NP = 32;
  localparam int unsigned SEED_A = 32'h1234_5678, SEED_B = 32'h0bad_cafe;

  logic clk = 1'b0, rst_n = 1'b0, eval = 1'b0;
  logic [11:0] loc_map [NP];
  logic [4:0]  aggr [NP];
  logic busy_a, valid_a, busy_b, valid_b;
  logic [NP-1:0] w_a, w_b;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  puf_array #(.NUM_PUF(NP), .DEVICE_SEED(SEED_A)) u_a (
    .clk, .rst_n, .eval, .loc_map, .aggr, .busy(busy_a), .valid(valid_a), .w(w_a));
  puf_array #(.NUM_PUF(NP), .DEVICE_SEED(SEED_B)) u_b (
    .clk, .rst_n, .eval, .loc_map, .aggr, .busy(busy_b), .valid(valid_b), .w(w_b));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // evaluate once; check the latency; check stable sites on chip A and B
  task automatic evaluate(output int hd);
    int cycles = 0;
    @(negedge clk);
    eval = 1'b1;
    @(negedge clk);
    eval = 1'b0;
    cycles = 1;
    while (!valid_a) begin @(negedge clk); cycles++; end
    check(cycles == 4, $sformatf("evaluation latency %0d, expected 4", cycles));
    check(valid_b, "chips not in step");
    for (int i = 0; i < NP; i++) begin
      int sa, sb;
      sa = ref_skew(SEED_A, loc_map[i], 4);
      sb = ref_skew(SEED_B, loc_map[i], 4);
      if (sa > 200 || sa < -200) check(w_a[i] == (sa >= 0), $sformatf("chip A cell %0d", i));
      if (sb > 200 || sb < -200) check(w_b[i] == (sb >= 0), $sformatf("chip B cell %0d", i));
    end
    hd = $countones(w_a ^ w_b);
  endtask

  initial begin
    int hd, hd_sum;
    for (int i = 0; i < NP; i++) begin loc_map[i] = 12'(i); aggr[i] = '0; end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    hd_sum = 0;
    for (int n = 0; n < 10; n++) begin evaluate(hd); hd_sum += hd; end
    // 10 readings of 32 bits: between-chip distance near 160 of 320
    $display("between-chip distance %0d of %0d", hd_sum, 10 * NP);
    check(hd_sum > 100 && hd_sum < 220, "chips not unique");
    // another placement: sites 1000.. instead of 0..
    for (int i = 0; i < NP; i++) loc_map[i] = 12'(1000 + 3 * i);
    for (int n = 0; n < 5; n++) evaluate(hd);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
