// puf_keygen_top: PUF-based key generator with per-device (variation-aware)
// PUF placement and a BCH(127,64,10) code-offset fuzzy extractor.
//
// Noisy PUF bits cannot be used as a key directly; an error-correcting code
// absorbs their flips, and the code gets cheaper as the PUF bits get more
// reliable. Here the PUF cells are placed only at sites measured to be
// reliable on this particular chip, which keeps the bit error rate below
// about 1 % and lets a BCH code with n = 127, k = 64, t = 10 reach a key
// failure rate under 1e-6 (placement that ignores the chip's variation sees
// about 4 % and would need n = 127, k = 29, t = 21 instead).
//
// Blocks:
//   puf_array        NUM_BLOCKS*127 Anderson PUF cells at the sites in loc_map
//   toggle_noise     5 toggle flip-flops per PUF bit (switching-noise aggressors)
//   fuzzy_extractor  enrollment / generation controller with BCH encoder and decoder
//   helper_mem       helper data, one 127-bit word per 64-bit key block
// The helper memory can be read and written from outside (host port) while
// the generator is idle, so that helper data can be kept in off-chip storage.
//
// Interface: start + op (OP_ENROLL with key_in, or OP_GENERATE) when busy is
// low; done pulses at the end, with key_out / key_valid / fail for a
// generation. loc_map is the per-chip placement (static). noise_en runs the
// aggressor flip-flops. host_* accesses the helper memory, read data one
// clock after the request; host requests are ignored while busy.
// Default KEY_BITS = 256 (4 blocks, 508 PUF bits); 56 and 128 also work.
module puf_keygen_top
  import bch_pkg::*;
  import keygen_pkg::*;
#(
  parameter int unsigned  KEY_BITS    = 256,
  parameter int unsigned  N           = BCH_N,
  parameter int unsigned  K           = BCH_K,
  parameter int unsigned  T           = BCH_T,
  parameter int unsigned  NUM_LOC     = 2080,
  parameter int unsigned  CHAIN_LUTS  = 5,
  parameter int unsigned  NUM_TFF     = 5,
  parameter logic [31:0]  DEVICE_SEED = 32'h1234_5678,
  parameter int unsigned  NUM_BLOCKS  = (KEY_BITS + K - 1) / K,
  parameter int unsigned  NUM_PUF     = NUM_BLOCKS * N,
  parameter int unsigned  LOC_W       = $clog2(NUM_LOC),
  parameter int unsigned  AW          = (NUM_BLOCKS > 1) ? $clog2(NUM_BLOCKS) : 1
) (
  input  logic                clk,
  input  logic                rst_n,
  // key operations
  input  logic                start,
  input  op_e                 op,
  input  logic [KEY_BITS-1:0] key_in,
  output logic                busy,
  output logic                done,
  output logic [KEY_BITS-1:0] key_out,
  output logic                key_valid,
  output logic                fail,
  output logic [15:0]         err_count,
  output logic [7:0]          err_max,
  // per-device placement and noise
  input  logic [LOC_W-1:0]    loc_map [NUM_PUF],
  input  logic                noise_en,
  // host access to helper data
  input  logic                host_en,
  input  logic                host_we,
  input  logic [AW-1:0]       host_addr,
  input  logic [N-1:0]        host_wdata,
  output logic [N-1:0]        host_rdata
);
  logic [NUM_TFF-1:0] aggr [NUM_PUF];
  logic               puf_eval, puf_busy, puf_valid;
  logic [NUM_PUF-1:0] puf_w;
  logic               fx_hd_en, fx_hd_we;
  logic [AW-1:0]      fx_hd_addr;
  logic [N-1:0]       fx_hd_wdata;
  logic               m_en, m_we;
  logic [AW-1:0]      m_addr;
  logic [N-1:0]       m_wdata, m_rdata;

  toggle_noise #(.NUM_PUF(NUM_PUF), .NUM_TFF(NUM_TFF)) u_noise (
    .clk, .rst_n, .en(noise_en), .q(aggr)
  );

  puf_array #(
    .NUM_PUF(NUM_PUF), .NUM_LOC(NUM_LOC), .LOC_W(LOC_W), .NUM_TFF(NUM_TFF),
    .CHAIN_LUTS(CHAIN_LUTS), .DEVICE_SEED(DEVICE_SEED)
  ) u_puf (
    .clk, .rst_n, .eval(puf_eval), .loc_map, .aggr,
    .busy(puf_busy), .valid(puf_valid), .w(puf_w)
  );

  fuzzy_extractor #(
    .KEY_BITS(KEY_BITS), .N(N), .K(K), .T(T), .NUM_BLOCKS(NUM_BLOCKS), .AW(AW)
  ) u_fx (
    .clk, .rst_n, .start, .op, .key_in,
    .puf_eval, .puf_valid, .puf_w,
    .hd_en(fx_hd_en), .hd_we(fx_hd_we), .hd_addr(fx_hd_addr),
    .hd_wdata(fx_hd_wdata), .hd_rdata(m_rdata),
    .busy, .done, .key_out, .key_valid, .fail, .err_count, .err_max
  );

  // helper memory port: the controller while busy, the host otherwise
  always_comb begin
    if (busy) begin
      m_en = fx_hd_en;  m_we = fx_hd_we;  m_addr = fx_hd_addr;  m_wdata = fx_hd_wdata;
    end else begin
      m_en = host_en;   m_we = host_we;   m_addr = host_addr;   m_wdata = host_wdata;
    end
  end

  helper_mem #(.N(N), .NUM_BLOCKS(NUM_BLOCKS), .AW(AW)) u_hd (
    .clk, .en(m_en), .we(m_we), .addr(m_addr), .wdata(m_wdata), .rdata(m_rdata)
  );

  assign host_rdata = m_rdata;

endmodule
