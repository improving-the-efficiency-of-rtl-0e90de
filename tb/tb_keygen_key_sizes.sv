// tb_keygen_key_sizes: the key generator built for 56-bit keys (one BCH
// block, 127 PUF cells) and for 128-bit keys (two blocks, 254 cells), side by
// side. Cells are placed on sites whose skew is far from zero (predicted from
// the PUF model's skew formula rather than measured). Each instance enrolls
// random keys and regenerates them with the aggressors toggling; keys, the
// valid flag and the operation latencies are checked.
module tb_keygen_key_sizes;
  import keygen_pkg::*;
  import puf_tb_pkg::*;

  localparam logic [31:0] SEED = 32'h1234_5678;

  logic clk = 1'b0, rst_n = 1'b0;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // ---- 56-bit key ----
  logic s56 = 1'b0; op_e op56 = OP_ENROLL;
  logic [55:0] kin56 = '0, kout56;
  logic busy56, done56, kv56, fail56;
  logic [15:0] ec56; logic [7:0] em56;
  logic [11:0] loc56 [127];
  logic [126:0] hr56;
  puf_keygen_top #(.KEY_BITS(56)) u56 (
    .clk, .rst_n, .start(s56), .op(op56), .key_in(kin56), .busy(busy56), .done(done56),
    .key_out(kout56), .key_valid(kv56), .fail(fail56), .err_count(ec56), .err_max(em56),
    .loc_map(loc56), .noise_en(1'b1), .host_en(1'b0), .host_we(1'b0), .host_addr(1'b0),
    .host_wdata('0), .host_rdata(hr56));

  // ---- 128-bit key ----
  logic s128 = 1'b0; op_e op128 = OP_ENROLL;
  logic [127:0] kin128 = '0, kout128;
  logic busy128, done128, kv128, fail128;
  logic [15:0] ec128; logic [7:0] em128;
  logic [11:0] loc128 [254];
  logic [126:0] hr128;
  puf_keygen_top #(.KEY_BITS(128)) u128 (
    .clk, .rst_n, .start(s128), .op(op128), .key_in(kin128), .busy(busy128), .done(done128),
    .key_out(kout128), .key_valid(kv128), .fail(fail128), .err_count(ec128), .err_max(em128),
    .loc_map(loc128), .noise_en(1'b1), .host_en(1'b0), .host_we(1'b0), .host_addr(1'b0),
    .host_wdata('0), .host_rdata(hr128));

  initial begin
    int n, site, s;
    // choose stable sites in site order
    n = 0; site = 0;
    while (n < 254) begin
      s = ref_skew(SEED, site, 4);
      if (s > 200 || s < -200) begin
        loc128[n] = 12'(site);
        if (n < 127) loc56[n] = 12'(site);
        n++;
      end
      site++;
    end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    fork
      begin : run56
        logic [55:0] key;
        int cyc;
        for (int r = 0; r < 3; r++) begin
          key = 56'({$urandom, $urandom});
          @(negedge clk); op56 = OP_ENROLL; kin56 = key; s56 = 1'b1;
          @(negedge clk); s56 = 1'b0; cyc = 1;
          while (!done56) begin @(negedge clk); cyc++; end
          check(cyc == 7 + 68, $sformatf("56-bit enrollment %0d clocks", cyc));
          for (int g = 0; g < 4; g++) begin
            @(negedge clk); op56 = OP_GENERATE; s56 = 1'b1;
            @(negedge clk); s56 = 1'b0; cyc = 1;
            while (!done56) begin @(negedge clk); cyc++; end
            check(cyc == 7 + 279, $sformatf("56-bit generation %0d clocks", cyc));
            check(kv56 && kout56 == key, "56-bit key not regenerated");
          end
        end
      end
      begin : run128
        logic [127:0] key;
        int cyc;
        for (int r = 0; r < 3; r++) begin
          key = {$urandom, $urandom, $urandom, $urandom};
          @(negedge clk); op128 = OP_ENROLL; kin128 = key; s128 = 1'b1;
          @(negedge clk); s128 = 1'b0; cyc = 1;
          while (!done128) begin @(negedge clk); cyc++; end
          check(cyc == 7 + 2 * 68, $sformatf("128-bit enrollment %0d clocks", cyc));
          for (int g = 0; g < 4; g++) begin
            @(negedge clk); op128 = OP_GENERATE; s128 = 1'b1;
            @(negedge clk); s128 = 1'b0; cyc = 1;
            while (!done128) begin @(negedge clk); cyc++; end
            check(cyc == 7 + 2 * 279, $sformatf("128-bit generation %0d clocks", cyc));
            check(kv128 && kout128 == key, "128-bit key not regenerated");
          end
        end
      end
    join
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
