// tb_anderson_puf_cell: 128 PUF cell models at sites 0..127 of one chip.
// Sites whose skew exceeds the largest possible jitter must always give the
// sign of their skew; sites near zero skew must flip now and then; flips must
// be more frequent with the aggressor flip-flops toggling than without.
module tb_anderson_puf_cell;
  import puf_tb_pkg::*;

  localparam int NC = 128;
  localparam int unsigned SEED = 32'h1234_5678;

  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0;
  logic [4:0] aggr = '0;
  logic [NC-1:0] q;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  for (genvar i = 0; i < NC; i++) begin : g_c
    anderson_puf_cell #(.DEVICE_SEED(SEED)) u (
      .clk, .rst_n, .en, .loc(12'(i)), .aggr, .q(q[i]));
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // count bits that differ from the sign of the skew over nt evaluations
  int flips_quiet, flips_noisy, noisy_sites_flipped;
  int skew [NC];

  task automatic run_trials(input int nt, input bit toggling, output int flips, output int flipped_sites);
    int site_flips [NC];
    flips = 0;
    flipped_sites = 0;
    for (int i = 0; i < NC; i++) site_flips[i] = 0;
    for (int n = 0; n < nt; n++) begin
      @(negedge clk);
      en = 1'b1;
      if (toggling) aggr = ~aggr;
      @(negedge clk);
      en = 1'b0;
      for (int i = 0; i < NC; i++)
        if (q[i] != (skew[i] >= 0)) site_flips[i]++;
    end
    for (int i = 0; i < NC; i++) begin
      flips += site_flips[i];
      if (site_flips[i] > 0) flipped_sites++;
      // the largest jitter is 2*(60 + 8*5) = 200
      if (skew[i] > 200 || skew[i] < -200)
        check(site_flips[i] == 0, $sformatf("stable site %0d (skew %0d) flipped %0d times", i, skew[i], site_flips[i]));
    end
  endtask

  initial begin
    int dummy;
    for (int i = 0; i < NC; i++) skew[i] = ref_skew(SEED, i, 4);
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    run_trials(300, 1'b0, flips_quiet, dummy);
    run_trials(300, 1'b1, flips_noisy, noisy_sites_flipped);
    $display("flips quiet %0d noisy %0d, sites that flipped %0d", flips_quiet, flips_noisy, noisy_sites_flipped);
    check(flips_noisy > flips_quiet, "toggling aggressors did not raise the error rate");
    check(noisy_sites_flipped > 0, "no site ever flipped");
    check(noisy_sites_flipped < NC / 2, "most sites unstable");
    // bit error rate with toggling between 1 % and 10 %
    check(flips_noisy * 100 > 300 * NC && flips_noisy * 10 < 300 * NC,
          $sformatf("noisy error rate %0d/%0d out of range", flips_noisy, 300 * NC));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
