// fuzzy_extractor: code-offset fuzzy extractor that binds a key to the PUF.
//
// The key is split into NUM_BLOCKS segments X_i of K bits (the last one padded
// with zeros), and segment i uses PUF bits W_i = w[i*N +: N].
//   Enrollment: C_i = BCH_encode(X_i); helper data H_i = C_i xor W_i is written
//               to the helper memory at address i.
//   Generation: a fresh reading W'_i gives H_i xor W'_i = C_i xor (W_i xor W'_i),
//               the codeword with the PUF bit flips as errors; the BCH decoder
//               removes up to T of them and returns X_i.
// The PUF is evaluated once per operation and its N*NUM_BLOCKS bits are
// cleared from the register when the operation ends. Blocks are processed one
// after another through a single encoder and a single decoder. The
// construction and code follow the key generator; the sequencing, the zero
// padding and the status outputs are this design's choices.
//
// Interface: start with op and (for enrollment) key_in is accepted when busy
// is low. done pulses at the end; for generation key_out holds the key,
// key_valid is high if every block decoded, fail if any block had more than T
// errors. err_count is the total number of bits corrected in the last
// generation and err_max the largest number in one block.
// Timing, counting from the clock edge that takes start to done: the PUF
// latency (clocks from puf_eval to puf_valid) + 3, plus 68 clocks per block
// for enrollment or 279 clocks per block for generation.
module fuzzy_extractor
  import bch_pkg::*;
  import keygen_pkg::*;
#(
  parameter int unsigned KEY_BITS   = 256,
  parameter int unsigned N          = BCH_N,
  parameter int unsigned K          = BCH_K,
  parameter int unsigned T          = BCH_T,
  parameter int unsigned NUM_BLOCKS = (KEY_BITS + K - 1) / K,
  parameter int unsigned AW         = (NUM_BLOCKS > 1) ? $clog2(NUM_BLOCKS) : 1
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      start,
  input  op_e                       op,
  input  logic [KEY_BITS-1:0]       key_in,
  // PUF bank
  output logic                      puf_eval,
  input  logic                      puf_valid,
  input  logic [NUM_BLOCKS*N-1:0]   puf_w,
  // helper data memory
  output logic                      hd_en,
  output logic                      hd_we,
  output logic [AW-1:0]             hd_addr,
  output logic [N-1:0]              hd_wdata,
  input  logic [N-1:0]              hd_rdata,
  // status and result
  output logic                      busy,
  output logic                      done,
  output logic [KEY_BITS-1:0]       key_out,
  output logic                      key_valid,
  output logic                      fail,
  output logic [15:0]               err_count,
  output logic [7:0]                err_max
);
  typedef enum logic [3:0] {
    F_IDLE, F_PUF, F_ENC_GO, F_ENC_WAIT, F_RD, F_DEC_GO, F_DEC_WAIT, F_NEXT, F_FIN
  } fstate_e;

  fstate_e                   state_q;
  op_e                       op_q;
  logic [NUM_BLOCKS*K-1:0]   key_q;      // padded key (enrollment in, generation out)
  logic [NUM_BLOCKS*N-1:0]   w_q;        // PUF reading for this operation
  logic [AW-1:0]             blk_q;

  // encoder / decoder
  logic         enc_start, enc_busy, enc_done;
  logic [N-1:0] enc_cw;
  logic         dec_start, dec_busy, dec_done, dec_fail;
  logic [K-1:0] dec_msg;
  logic [$clog2(N+1)-1:0] dec_nerr;

  bch_encoder #(.N(N), .K(K)) u_enc (
    .clk, .rst_n, .start(enc_start), .msg(key_q[blk_q*K +: K]),
    .busy(enc_busy), .done(enc_done), .codeword(enc_cw)
  );

  bch_decoder #(.N(N), .K(K), .T(T)) u_dec (
    .clk, .rst_n, .start(dec_start), .rx(hd_rdata ^ w_q[blk_q*N +: N]),
    .busy(dec_busy), .done(dec_done), .msg(dec_msg), .corrected(),
    .nerr(dec_nerr), .fail(dec_fail)
  );

  assign enc_start = (state_q == F_ENC_GO);
  assign dec_start = (state_q == F_DEC_GO);
  assign puf_eval  = (state_q == F_PUF) && !puf_valid;

  // helper memory port: write at the end of an encode, read before a decode
  always_comb begin
    hd_en    = 1'b0;
    hd_we    = 1'b0;
    hd_addr  = blk_q;
    hd_wdata = enc_cw ^ w_q[blk_q*N +: N];
    if (state_q == F_ENC_WAIT && enc_done) begin
      hd_en = 1'b1;
      hd_we = 1'b1;
    end
    if (state_q == F_RD) hd_en = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q   <= F_IDLE;
      op_q      <= OP_ENROLL;
      key_q     <= '0;
      w_q       <= '0;
      blk_q     <= '0;
      busy      <= 1'b0;
      done      <= 1'b0;
      key_out   <= '0;
      key_valid <= 1'b0;
      fail      <= 1'b0;
      err_count <= '0;
      err_max   <= '0;
    end else begin
      done <= 1'b0;
      unique case (state_q)
        F_IDLE: if (start) begin
          op_q      <= op;
          key_q     <= (NUM_BLOCKS*K)'(key_in);
          blk_q     <= '0;
          busy      <= 1'b1;
          fail      <= 1'b0;
          key_valid <= 1'b0;
          err_count <= '0;
          err_max   <= '0;
          state_q   <= F_PUF;
        end
        F_PUF: if (puf_valid) begin
          w_q     <= puf_w;
          state_q <= (op_q == OP_ENROLL) ? F_ENC_GO : F_RD;
        end
        F_ENC_GO:   state_q <= F_ENC_WAIT;
        F_ENC_WAIT: if (enc_done) state_q <= F_NEXT;
        F_RD:       state_q <= F_DEC_GO;
        F_DEC_GO:   state_q <= F_DEC_WAIT;
        F_DEC_WAIT: if (dec_done) begin
          key_q[blk_q*K +: K] <= dec_msg;
          fail      <= fail | dec_fail;
          err_count <= err_count + 16'(dec_nerr);
          if (8'(dec_nerr) > err_max) err_max <= 8'(dec_nerr);
          state_q   <= F_NEXT;
        end
        F_NEXT: begin
          if (int'(blk_q) == int'(NUM_BLOCKS) - 1) begin
            state_q <= F_FIN;
          end else begin
            blk_q   <= blk_q + 1'b1;
            state_q <= (op_q == OP_ENROLL) ? F_ENC_GO : F_RD;
          end
        end
        F_FIN: begin
          if (op_q == OP_GENERATE) begin
            key_out   <= key_q[KEY_BITS-1:0];
            key_valid <= !fail;
          end
          key_q   <= '0;            // no key or PUF bits linger after the operation
          w_q     <= '0;
          busy    <= 1'b0;
          done    <= 1'b1;
          state_q <= F_IDLE;
        end
        default: state_q <= F_IDLE;
      endcase
    end
  end

  // the decoder and encoder are only started when idle
  a_enc_idle: assert property (@(posedge clk) disable iff (!rst_n) !(enc_start && enc_busy))
    else $error("fuzzy_extractor: encoder restarted while busy");
  a_dec_idle: assert property (@(posedge clk) disable iff (!rst_n) !(dec_start && dec_busy))
    else $error("fuzzy_extractor: decoder restarted while busy");

endmodule
