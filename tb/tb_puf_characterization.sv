// tb_puf_characterization: reliability and uniqueness of the PUF model over
// four chips, each a bank of 2080 cells covering every candidate site, read
// TRIALS times with the aggressor flip-flops toggling.
//   * Within-class distance: sites 0..2047 form 16 disjoint 128-bit PUFs; two
//     random readings of the same PUF on the same chip are compared. The mean
//     must be small (a few bits of 128; about 5 on real parts).
//   * Between-class distance: the same 128-bit PUF on two different chips.
//     The mean must be close to 64.
//   * Per-site error rates of two chips must be uncorrelated (Pearson
//     coefficient near 0), the property that makes per-chip placement
//     necessary.
module tb_puf_characterization;
  localparam int NLOC = 2080, NCHIP = 4, TRIALS = 100, NPUF = 16, PB = 128, CMP = 2000;

  logic clk = 1'b0, rst_n = 1'b0, eval = 1'b0;
  logic [11:0] loc_map [NLOC];
  logic [4:0]  aggr [NLOC];
  logic [NCHIP-1:0] busy, valid;
  logic [NLOC-1:0] w [NCHIP];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  always @(posedge clk) for (int i = 0; i < NLOC; i++) aggr[i] <= ~aggr[i];

  localparam logic [31:0] SEEDS [NCHIP] = '{32'h1234_5678, 32'h0bad_cafe, 32'h5eed_0003, 32'h7777_1234};
  for (genvar c = 0; c < NCHIP; c++) begin : g_chip
    puf_array #(.NUM_PUF(NLOC), .DEVICE_SEED(SEEDS[c])) u (
      .clk, .rst_n, .eval, .loc_map, .aggr, .busy(busy[c]), .valid(valid[c]), .w(w[c]));
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic [NLOC-1:0] rd [NCHIP][TRIALS];
  int ones [NCHIP][NLOC];
  real ber [NCHIP][NLOC];

  initial begin
    real hd_within, hd_between, mean_ber, r, sx, sy, sxy, sxx, syy, mx, my, rmax;
    for (int i = 0; i < NLOC; i++) begin loc_map[i] = 12'(i); aggr[i] = 5'b01010; end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < TRIALS; t++) begin
      @(negedge clk); eval = 1'b1;
      @(negedge clk); eval = 1'b0;
      while (!valid[0]) @(negedge clk);
      for (int c = 0; c < NCHIP; c++) rd[c][t] = w[c];
    end
    // per-site error rate: minority fraction
    mean_ber = 0.0;
    for (int c = 0; c < NCHIP; c++)
      for (int s = 0; s < NLOC; s++) begin
        ones[c][s] = 0;
        for (int t = 0; t < TRIALS; t++) ones[c][s] += int'(rd[c][t][s]);
        ber[c][s] = real'((ones[c][s] < TRIALS - ones[c][s]) ? ones[c][s] : TRIALS - ones[c][s]) / TRIALS;
        mean_ber += ber[c][s];
      end
    mean_ber /= (NCHIP * NLOC);
    // within-class and between-class Hamming distances of 128-bit PUFs
    hd_within = 0.0;
    hd_between = 0.0;
    for (int k = 0; k < CMP; k++) begin
      int c, c2, p, t1, t2;
      c = $urandom_range(NCHIP - 1, 0);
      c2 = (c + 1 + $urandom_range(NCHIP - 2, 0)) % NCHIP;
      p = $urandom_range(NPUF - 1, 0);
      t1 = $urandom_range(TRIALS - 1, 0);
      do t2 = $urandom_range(TRIALS - 1, 0); while (t2 == t1);
      hd_within  += $countones(rd[c][t1][p*PB +: PB] ^ rd[c][t2][p*PB +: PB]);
      hd_between += $countones(rd[c][t1][p*PB +: PB] ^ rd[c2][t2][p*PB +: PB]);
    end
    hd_within /= CMP;
    hd_between /= CMP;
    // Pearson coefficient of per-site error rates for every pair of chips
    rmax = 0.0;
    for (int a = 0; a < NCHIP; a++)
      for (int b = a + 1; b < NCHIP; b++) begin
        sx = 0.0; sy = 0.0;
        for (int s = 0; s < NLOC; s++) begin sx += ber[a][s]; sy += ber[b][s]; end
        mx = sx / NLOC; my = sy / NLOC;
        sxy = 0.0; sxx = 0.0; syy = 0.0;
        for (int s = 0; s < NLOC; s++) begin
          sxy += (ber[a][s] - mx) * (ber[b][s] - my);
          sxx += (ber[a][s] - mx) ** 2;
          syy += (ber[b][s] - my) ** 2;
        end
        r = sxy / ($sqrt(sxx) * $sqrt(syy));
        $display("Pearson r(chip %0d, chip %0d) = %f", a, b, r);
        if (r > rmax) rmax = r;
        if (-r > rmax) rmax = -r;
      end
    $display("mean per-site BER %f, mean within-class distance %f, mean between-class distance %f (of 128)",
             mean_ber, hd_within, hd_between);
    check(mean_ber > 0.02 && mean_ber < 0.07, "mean BER outside 2..7 %");
    check(hd_within > 2.0 && hd_within < 10.0, "within-class distance out of range");
    check(hd_between > 54.0 && hd_between < 74.0, "between-class distance out of range");
    check(rmax < 0.1, "per-site error rates correlated hd_between chips");
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
