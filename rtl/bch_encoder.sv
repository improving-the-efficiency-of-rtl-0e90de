// bch_encoder: systematic BCH(127,64,10) encoder for key enrollment.
//
// A k-bit key segment X is turned into the n-bit codeword
// C(x) = X(x)*x^(n-k) + (X(x)*x^(n-k) mod g(x)). The remainder is formed by the
// classic bit-serial division LFSR: one message bit per clock, most significant
// first, so the circuit is a 63-bit shift register with feedback taps at the
// ones of g(x). Bit-serial operation keeps the encoder small, in keeping with
// the area focus of the key generator; the serial structure is this design's
// choice, the code parameters are the key generator's.
//
// Interface: pulse start with msg valid; msg is sampled at start. busy is high
// while encoding. done pulses for one cycle when codeword is valid; codeword
// holds until the next start. codeword[126:63] = msg, codeword[62:0] = parity.
// Timing: done rises K+2 clocks after the clock edge that samples start
// (66 clocks for K = 64).
module bch_encoder
  import bch_pkg::*;
#(
  parameter int unsigned N = BCH_N,
  parameter int unsigned K = BCH_K
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [K-1:0] msg,
  output logic         busy,
  output logic         done,
  output logic [N-1:0] codeword
);
  localparam int unsigned R = N - K;
  localparam logic [R-1:0] TAPS = BCH_GEN[R-1:0];

  logic [K-1:0]         msg_q;     // message, shifted out MSB first
  logic [R-1:0]         rem_q;     // running remainder
  logic [$clog2(K+1)-1:0] cnt_q;   // bits still to shift
  logic [K-1:0]         codeword_msg_q;

  logic fb;
  assign fb = msg_q[K-1] ^ rem_q[R-1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      msg_q    <= '0;
      rem_q    <= '0;
      cnt_q    <= '0;
      busy     <= 1'b0;
      done     <= 1'b0;
      codeword <= '0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        msg_q <= msg;
        rem_q <= '0;
        cnt_q <= ($clog2(K+1))'(K);
        busy  <= 1'b1;
      end else if (busy) begin
        if (cnt_q != 0) begin
          msg_q <= msg_q << 1;
          rem_q <= (rem_q << 1) ^ (fb ? TAPS : '0);
          cnt_q <= cnt_q - 1'b1;
        end else begin
          codeword[N-1:R] <= codeword_msg_q;
          codeword[R-1:0] <= rem_q;
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

  // The message itself, kept for the systematic part of the codeword.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                 codeword_msg_q <= '0;
    else if (start && !busy)    codeword_msg_q <= msg;
  end

endmodule
