// anderson_puf_cell: BEHAVIOURAL MODEL (not synthesizable) of one Anderson PUF
// bit, the LUT and carry-chain PUF of Xilinx fabrics.
//
// The real cell is two LUTs used as 16-bit shift registers, loaded with the
// complementary patterns 0101... and 1010..., whose outputs drive two carry
// multiplexers a few LUT positions apart in the same carry chain. Every clock
// both outputs switch; depending on which path is faster a short glitch does
// or does not reach the capturing flip-flop, giving a device-specific bit.
// Manufacturing variation and noise are analog, so this model replaces the
// race with arithmetic:
//   skew   = sum over the CHAIN_LUTS-1 carry stages between the two LUTs of a
//            per-stage delay difference, uniform in [-512, 511] (arbitrary
//            units), drawn from a hash of DEVICE_SEED, the placement location
//            loc and the stage index. It is fixed for a (chip, location) pair
//            and uncorrelated between chips and between neighbouring sites.
//   jitter = sum of two uniform draws in [-J, J], with
//            J = JITTER_BASE + JITTER_PER_TOGGLE * (aggressor transitions this
//            clock), so nearby switching logic makes the bit noisier.
//   q      = (skew + jitter >= 0), captured on every enabled clock.
// With the defaults and all five aggressors toggling, the mean bit error rate
// over all sites is about 4 %, and a few percent of sites are far noisier,
// while many sites almost never flip; this is the spread that per-device
// placement exploits. The vertical distance of five LUTs is the figure found
// best on 7-series parts; all delay and noise magnitudes are this model's own.
//
// Interface: en enables the shift registers and the capture; q is valid from
// the clock after the first enabled clock. loc is the site index the cell is
// placed at (a static placement choice, not a run-time signal in hardware).
module anderson_puf_cell #(
  parameter int unsigned  CHAIN_LUTS        = 5,
  parameter int unsigned  NUM_AGGR          = 5,
  parameter int unsigned  LOC_W             = 12,
  parameter logic [31:0]  DEVICE_SEED       = 32'h1234_5678,
  parameter int unsigned  JITTER_BASE       = 60,
  parameter int unsigned  JITTER_PER_TOGGLE = 8
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                en,
  input  logic [LOC_W-1:0]    loc,
  input  logic [NUM_AGGR-1:0] aggr,
  output logic                q
);
  // integer mixing hash (xorshift-multiply) standing in for process variation
  function automatic logic [31:0] vhash(input logic [31:0] x);
    logic [31:0] h;
    h = x;
    h = h ^ (h >> 16);
    h = h * 32'h7feb_352d;
    h = h ^ (h >> 15);
    h = h * 32'h846c_a68b;
    h = h ^ (h >> 16);
    return h;
  endfunction

  function automatic int site_skew(input logic [LOC_W-1:0] l);
    int s;
    s = 0;
    for (int k = 0; k < int'(CHAIN_LUTS) - 1; k++)
      s += int'(vhash(DEVICE_SEED ^ ((32'(l) << 3) + 32'(k))) & 32'h3ff) - 512;
    return s;
  endfunction

  logic [15:0]         srl_a, srl_b;   // the two LUT shift registers
  logic [NUM_AGGR-1:0] aggr_prev;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      srl_a     <= 16'h5555;
      srl_b     <= 16'haaaa;
      aggr_prev <= '0;
      q         <= 1'b0;
    end else begin
      aggr_prev <= aggr;
      if (en) begin
        int j, jitter;
        srl_a <= {srl_a[14:0], srl_a[15]};
        srl_b <= {srl_b[14:0], srl_b[15]};
        j      = int'(JITTER_BASE) + int'(JITTER_PER_TOGGLE) * $countones(aggr ^ aggr_prev);
        jitter = int'($urandom_range(32'(2 * j), 0)) - j
               + int'($urandom_range(32'(2 * j), 0)) - j;
        // a race only happens when the two LUT outputs switch in opposite directions
        if (srl_a[15] != srl_b[15]) q <= (site_skew(loc) + jitter >= 0);
      end
    end
  end

endmodule
