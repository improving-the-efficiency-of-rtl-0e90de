// bch_decoder: BCH(127,64,10) decoder for key generation.
//
// In the field, the helper data XORed with a fresh PUF reading gives the
// enrolled codeword corrupted by the PUF bit errors; this block removes up to
// T = 10 of them and returns the k = 64 information bits. It is a
// three-stage sequential decoder:
//   1. Syndromes: S_j = r(alpha^j), j = 1..2T, by Horner's rule, one received
//      bit per clock, most significant first (N clocks, all 2T in parallel).
//   2. Error locator: inversionless Berlekamp-Massey, one iteration per clock
//      (2T clocks). Lambda(x) = 1 + ... has roots at alpha^-p for every error
//      position p; L is its degree.
//   3. Chien search: register j holds Lambda_j * alpha^(-j*i) at clock i, so
//      the sum of the registers is Lambda(alpha^-i); a zero flips bit i
//      (N clocks).
// If the number of roots found differs from L the word had more than T errors
// and fail is raised. The code parameters and the use of a BCH decoder are the
// key generator's; the decoder architecture is this design's choice.
//
// Interface: pulse start with rx valid (sampled at start). done pulses once
// when msg, corrected, nerr and fail are valid; they hold until the next
// start. Timing: done rises N + 2T + N + 2 clocks after start (276 clocks).
module bch_decoder
  import bch_pkg::*;
#(
  parameter int unsigned N = BCH_N,
  parameter int unsigned K = BCH_K,
  parameter int unsigned T = BCH_T
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     start,
  input  logic [N-1:0]             rx,
  output logic                     busy,
  output logic                     done,
  output logic [K-1:0]             msg,
  output logic [N-1:0]             corrected,
  output logic [$clog2(N+1)-1:0]   nerr,
  output logic                     fail
);
  localparam int unsigned NS = 2 * T;   // number of syndromes

  typedef enum logic [2:0] {S_IDLE, S_SYND, S_BM, S_CHIEN, S_FIN} state_e;
  state_e state_q;

  logic [N-1:0]            shift_q;          // received word, shifted MSB first
  logic [N-1:0]            word_q;           // word being corrected
  gf_t                     synd_q  [1:NS];
  gf_t                     lam_q   [0:T];    // error locator
  gf_t                     bpol_q  [0:T];    // correction polynomial
  gf_t                     gamma_q;
  logic [$clog2(NS+1)-1:0] lsz_q;            // L, degree of Lambda
  logic [$clog2(N+1)-1:0]  cnt_q;            // step counter
  logic [$clog2(N+1)-1:0]  roots_q;

  // ---- Berlekamp-Massey iteration r = cnt_q (combinational) ----
  gf_t  delta;
  gf_t  lam_next [0:T];
  logic bm_update;
  always_comb begin
    int idx;
    delta = '0;
    for (int i = 0; i <= int'(T); i++) begin
      idx = int'(cnt_q) + 1 - i;
      if (idx >= 1 && idx <= int'(NS)) delta = delta ^ gf_mul(lam_q[i], synd_q[idx]);
    end
    for (int i = 0; i <= int'(T); i++)
      lam_next[i] = gf_mul(gamma_q, lam_q[i]) ^ ((i > 0) ? gf_mul(delta, bpol_q[i-1]) : '0);
    bm_update = (delta != '0) && (2 * int'(lsz_q) <= int'(cnt_q));
  end

  // ---- Chien search: Lambda(alpha^-i) for the current position ----
  gf_t chien_sum;
  always_comb begin
    chien_sum = '0;
    for (int j = 0; j <= int'(T); j++) chien_sum = chien_sum ^ lam_q[j];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q   <= S_IDLE;
      shift_q   <= '0;
      word_q    <= '0;
      for (int j = 1; j <= int'(NS); j++) synd_q[j] <= '0;
      for (int i = 0; i <= int'(T); i++) begin
        lam_q[i]  <= '0;
        bpol_q[i] <= '0;
      end
      gamma_q   <= '0;
      lsz_q     <= '0;
      cnt_q     <= '0;
      roots_q   <= '0;
      busy      <= 1'b0;
      done      <= 1'b0;
      msg       <= '0;
      corrected <= '0;
      nerr      <= '0;
      fail      <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state_q)
        S_IDLE: if (start) begin
          shift_q <= rx;
          word_q  <= rx;
          for (int j = 1; j <= int'(NS); j++) synd_q[j] <= '0;
          cnt_q   <= '0;
          busy    <= 1'b1;
          state_q <= S_SYND;
        end
        S_SYND: begin
          for (int j = 1; j <= int'(NS); j++)
            synd_q[j] <= gf_mul(synd_q[j], gf_alpha_pow(j)) ^ gf_t'(shift_q[N-1]);
          shift_q <= shift_q << 1;
          if (cnt_q == ($clog2(N+1))'(N - 1)) begin
            cnt_q <= '0;
            for (int i = 0; i <= int'(T); i++) begin
              lam_q[i]  <= (i == 0) ? gf_t'(1) : '0;
              bpol_q[i] <= (i == 0) ? gf_t'(1) : '0;
            end
            gamma_q <= gf_t'(1);
            lsz_q   <= '0;
            state_q <= S_BM;
          end else begin
            cnt_q <= cnt_q + 1'b1;
          end
        end
        S_BM: begin
          for (int i = 0; i <= int'(T); i++) lam_q[i] <= lam_next[i];
          if (bm_update) begin
            for (int i = 0; i <= int'(T); i++) bpol_q[i] <= lam_q[i];
            lsz_q   <= ($clog2(NS+1))'(int'(cnt_q) + 1 - int'(lsz_q));
            gamma_q <= delta;
          end else begin
            bpol_q[0] <= '0;
            for (int i = 1; i <= int'(T); i++) bpol_q[i] <= bpol_q[i-1];
          end
          if (cnt_q == ($clog2(N+1))'(NS - 1)) begin
            cnt_q   <= '0;
            roots_q <= '0;
            state_q <= S_CHIEN;
          end else begin
            cnt_q <= cnt_q + 1'b1;
          end
        end
        S_CHIEN: begin
          if (chien_sum == '0) begin
            word_q[cnt_q] <= ~word_q[cnt_q];
            roots_q       <= roots_q + 1'b1;
          end
          for (int j = 0; j <= int'(T); j++)
            lam_q[j] <= gf_mul(lam_q[j], gf_alpha_pow(-j));
          if (cnt_q == ($clog2(N+1))'(N - 1)) state_q <= S_FIN;
          else                                cnt_q   <= cnt_q + 1'b1;
        end
        S_FIN: begin
          msg       <= word_q[N-1:N-K];
          corrected <= word_q;
          nerr      <= roots_q;
          fail      <= (($clog2(N+1))'(lsz_q) != roots_q) || (int'(lsz_q) > int'(T));
          busy      <= 1'b0;
          done      <= 1'b1;
          state_q   <= S_IDLE;
        end
        default: state_q <= S_IDLE;
      endcase
    end
  end

endmodule
