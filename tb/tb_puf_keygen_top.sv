// tb_puf_keygen_top: end-to-end run of the key generator at its default size
// (256-bit key, 4 BCH blocks, 508 PUF cells, 2080 candidate sites).
//
//  1. Characterization: a separate 520-cell PUF bank on the same chip is
//     placed on each quarter of the 2080 sites in turn and read TRIALS times
//     with the aggressor flip-flops toggling; each site's bit error rate is
//     the minority count over the trials.
//  2. Variation-aware placement: the 508 sites with the lowest measured error
//     rate go into loc_map. A key is enrolled and regenerated many times; every
//     generation must return the key.
//  3. Helper data export and restore through the host port, then generation.
//  4. Tampered helper data (12 flipped bits in one block) must raise fail.
//  5. Variation-agnostic placement (sites 0..507) for comparison: more
//     corrected bits per generation than with the chosen sites.
// Each mechanism is counted and must have happened at least once.
module tb_puf_keygen_top;
  import keygen_pkg::*;

  localparam int KB = 256, NB = 4, N = 127, NP = NB * N, NLOC = 2080;
  localparam int BANK = NLOC / 4, TRIALS = 64, GENS = 12;
  localparam logic [31:0] SEED = 32'h1234_5678;   // the top's default chip

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  op_e  op = OP_ENROLL;
  logic [KB-1:0] key_in = '0, key_out;
  logic busy, done, key_valid, fail;
  logic [15:0] err_count;
  logic [7:0]  err_max;
  logic [11:0] loc_map [NP];
  logic noise_en = 1'b1;
  logic host_en = 1'b0, host_we = 1'b0;
  logic [1:0] host_addr = '0;
  logic [N-1:0] host_wdata = '0, host_rdata;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  puf_keygen_top dut (.*);

  // characterization bank
  logic        c_eval = 1'b0, c_busy, c_valid;
  logic [11:0] c_loc [BANK];
  logic [4:0]  c_aggr [BANK];
  logic [BANK-1:0] c_w;
  puf_array #(.NUM_PUF(BANK), .DEVICE_SEED(SEED)) u_char (
    .clk, .rst_n, .eval(c_eval), .loc_map(c_loc), .aggr(c_aggr),
    .busy(c_busy), .valid(c_valid), .w(c_w));
  always @(posedge clk) for (int i = 0; i < BANK; i++) c_aggr[i] <= ~c_aggr[i];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic run_op(input op_e o, input logic [KB-1:0] k, output int cycles);
    @(negedge clk);
    op = o; key_in = k; start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    cycles = 1;
    while (!done) begin @(negedge clk); cycles++; end
  endtask

  task automatic host_read(input int a, output logic [N-1:0] d);
    @(negedge clk);
    host_en = 1'b1; host_we = 1'b0; host_addr = 2'(a);
    @(negedge clk);
    host_en = 1'b0;
    d = host_rdata;
  endtask

  task automatic host_write(input int a, input logic [N-1:0] d);
    @(negedge clk);
    host_en = 1'b1; host_we = 1'b1; host_addr = 2'(a); host_wdata = d;
    @(negedge clk);
    host_en = 1'b0; host_we = 1'b0;
  endtask

  int ones [NLOC];
  int ber_key [NLOC];
  int n_enroll, n_gen_ok, n_corrected, n_export, n_tamper_fail, n_quiet_gen, n_agnostic;
  int err_aware, err_agnostic;

  // enrol a fresh key, then regenerate it `gens` times; returns corrected bits
  task automatic enroll_and_generate(input int gens, input bit expect_ok, output int errs);
    logic [KB-1:0] key;
    int cycles;
    key = {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom};
    run_op(OP_ENROLL, key, cycles);
    check(cycles == 7 + NB * 68, $sformatf("enrollment took %0d clocks", cycles));
    n_enroll++;
    errs = 0;
    for (int g = 0; g < gens; g++) begin
      run_op(OP_GENERATE, '0, cycles);
      check(cycles == 7 + NB * 279, $sformatf("generation took %0d clocks", cycles));
      errs += int'(err_count);
      if (err_count != 0) n_corrected++;
      if (expect_ok) begin
        check(key_valid && !fail && key_out == key, $sformatf("generation %0d lost the key (errors %0d, max %0d)", g, err_count, err_max));
        if (key_valid && key_out == key) n_gen_ok++;
      end else if (key_valid) begin
        check(key_out == key, "key_valid with a wrong key");
      end
    end
  endtask

  initial begin
    int cycles, errs;
    logic [N-1:0] saved [NB];
    logic [N-1:0] d;
    {n_enroll, n_gen_ok, n_corrected, n_export, n_tamper_fail, n_quiet_gen, n_agnostic} = '0;
    for (int i = 0; i < BANK; i++) c_aggr[i] = 5'b01010;
    for (int i = 0; i < NP; i++) loc_map[i] = 12'(i);
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    // 1. characterization of all sites
    for (int s = 0; s < NLOC; s++) ones[s] = 0;
    for (int q = 0; q < 4; q++) begin
      for (int i = 0; i < BANK; i++) c_loc[i] = 12'(q * BANK + i);
      for (int t = 0; t < TRIALS; t++) begin
        @(negedge clk); c_eval = 1'b1;
        @(negedge clk); c_eval = 1'b0;
        while (!c_valid) @(negedge clk);
        for (int i = 0; i < BANK; i++) ones[q * BANK + i] += int'(c_w[i]);
      end
    end
    // 2. keep the NP most reliable sites: sort by (minority count, site)
    for (int s = 0; s < NLOC; s++)
      ber_key[s] = ((ones[s] < TRIALS - ones[s]) ? ones[s] : TRIALS - ones[s]) * 4096 + s;
    ber_key.sort();
    begin
      int unstable_all = 0, unstable_sel = 0;
      for (int s = 0; s < NLOC; s++) if (ber_key[s] >= 4096) unstable_all++;
      for (int i = 0; i < NP; i++) begin
        loc_map[i] = 12'(ber_key[i] % 4096);
        if (ber_key[i] >= 4096) unstable_sel++;
      end
      $display("sites that flipped during characterization: %0d of %0d; among the chosen: %0d",
               unstable_all, NLOC, unstable_sel);
      check(unstable_all > 0, "characterization found no noisy site");
    end

    enroll_and_generate(GENS, 1'b1, err_aware);

    // 3. export helper data, wipe the memory, restore it, regenerate
    for (int b = 0; b < NB; b++) host_read(b, saved[b]);
    for (int b = 0; b < NB; b++) host_write(b, '0);
    host_read(0, d);
    check(d == '0, "helper memory not cleared by host write");
    for (int b = 0; b < NB; b++) host_write(b, saved[b]);
    n_export++;
    begin
      logic [KB-1:0] prev_key;
      prev_key = key_out;
      run_op(OP_GENERATE, '0, cycles);
      check(key_valid && key_out == prev_key, "key lost after helper data restore");
      // same with the aggressors stopped
      noise_en = 1'b0;
      run_op(OP_GENERATE, '0, cycles);
      check(key_valid && key_out == prev_key, "key lost with aggressors stopped");
      n_quiet_gen++;
      noise_en = 1'b1;
      // 4. tamper: flip 12 bits of block 2
      host_write(2, saved[2] ^ 127'hfff);
      run_op(OP_GENERATE, '0, cycles);
      check(fail && !key_valid, "tampered helper data not detected");
      if (fail) n_tamper_fail++;
      host_write(2, saved[2]);
      run_op(OP_GENERATE, '0, cycles);
      check(key_valid && key_out == prev_key, "key lost after repairing helper data");
    end

    // 5. variation-agnostic placement
    for (int i = 0; i < NP; i++) loc_map[i] = 12'(i);
    enroll_and_generate(GENS, 1'b0, err_agnostic);
    n_agnostic++;
    $display("corrected bits over %0d generations: chosen sites %0d, default sites %0d",
             GENS, err_aware, err_agnostic);
    check(err_agnostic > err_aware, "per-device placement did not lower the error count");
    // chosen sites: bit error rate below 1 % over all generations
    check(err_aware * 100 < GENS * NP, "bit error rate on the chosen sites not below 1 %");

    $display("mechanisms: enroll %0d, good generations %0d, with corrections %0d, helper export/restore %0d, quiet generations %0d, tamper detected %0d, agnostic runs %0d",
             n_enroll, n_gen_ok, n_corrected, n_export, n_quiet_gen, n_tamper_fail, n_agnostic);
    check(n_enroll > 0 && n_gen_ok > 0 && n_corrected > 0 && n_export > 0 &&
          n_quiet_gen > 0 && n_tamper_fail > 0 && n_agnostic > 0, "a mechanism never happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
