// tb_fuzzy_extractor: drives the code-offset fuzzy extractor (256-bit key,
// 4 blocks) with a modelled PUF whose reading is a fixed random vector W plus
// a chosen number of bit flips per block, and a modelled helper memory.
// Checks: helper data equals BCH(X_i) xor W_i; generation returns the
// enrolled key with up to 10 flips per block and reports the number of
// corrected bits; 11 or more flips in a block raise fail; the operation
// latencies match the documented figures.
module tb_fuzzy_extractor;
  import bch_tb_pkg::*;
  import keygen_pkg::*;

  localparam int KB = 256, NB = 4, N = 127;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  op_e  op = OP_ENROLL;
  logic [KB-1:0] key_in = '0, key_out;
  logic puf_eval, puf_valid = 1'b0;
  logic [NB*N-1:0] puf_w = '0;
  logic hd_en, hd_we;
  logic [1:0] hd_addr;
  logic [N-1:0] hd_wdata, hd_rdata = '0;
  logic busy, done, key_valid, fail;
  logic [15:0] err_count;
  logic [7:0] err_max;
  int checks = 0, failures = 0;

  logic [NB*N-1:0] w_enroll;      // the PUF's "true" reading
  logic [NB*N-1:0] flips;         // flips applied to the next reading
  logic [N-1:0] hmem [NB];

  always #5 clk = ~clk;

  fuzzy_extractor #(.KEY_BITS(KB)) dut (.*);

  // PUF model: 3 clocks after an eval request, present W xor flips
  always @(posedge clk) begin
    puf_valid <= 1'b0;
    if (puf_eval && !puf_valid) begin
      repeat (2) @(posedge clk);
      puf_w     <= w_enroll ^ flips;
      puf_valid <= 1'b1;
    end
  end

  // helper memory model with one-clock read
  always @(posedge clk)
    if (hd_en) begin
      if (hd_we) hmem[hd_addr] <= hd_wdata;
      else       hd_rdata      <= hmem[hd_addr];
    end

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

  function automatic logic [NB*N-1:0] make_flips(input int per_block [NB]);
    logic [NB*N-1:0] f;
    for (int b = 0; b < NB; b++) f[b*N +: N] = rand_errors(per_block[b]);
    return f;
  endfunction

  initial begin
    logic [KB-1:0] key;
    int cycles, nf [NB], total;
    w_enroll = {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom,
                $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom};
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int round = 0; round < 3; round++) begin
      key = {rand64(), rand64(), rand64(), rand64()};
      flips = '0;
      run_op(OP_ENROLL, key, cycles);
      check(cycles == 6 + NB * 68, $sformatf("enrollment took %0d clocks", cycles));
      for (int b = 0; b < NB; b++)
        check(hmem[b] == (ref_encode(key[b*64 +: 64]) ^ w_enroll[b*N +: N]),
              $sformatf("helper data block %0d", b));
      // generations with 0..10 flips per block
      for (int g = 0; g < 6; g++) begin
        total = 0;
        for (int b = 0; b < NB; b++) begin nf[b] = $urandom_range(10, 0); total += nf[b]; end
        if (g == 0) for (int b = 0; b < NB; b++) begin nf[b] = 10; end
        if (g == 0) total = 40;
        flips = make_flips(nf);
        run_op(OP_GENERATE, '0, cycles);
        check(cycles == 6 + NB * 279, $sformatf("generation took %0d clocks", cycles));
        check(key_valid && !fail, "generation flagged as failed");
        check(key_out == key, $sformatf("key mismatch: %h vs %h", key_out, key));
        check(int'(err_count) == total, $sformatf("err_count %0d expected %0d", err_count, total));
      end
      // one block with too many flips
      for (int b = 0; b < NB; b++) nf[b] = 2;
      nf[round] = 12;
      flips = make_flips(nf);
      run_op(OP_GENERATE, '0, cycles);
      check(fail && !key_valid, "12 flips in one block not reported");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
