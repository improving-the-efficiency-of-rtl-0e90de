// toggle_noise: aggressor toggle flip-flops placed with the PUF cells.
//
// To reproduce the switching noise of an application sharing the fabric, each
// PUF bit has NUM_TFF toggle flip-flops placed in the slices that form it,
// all toggling on every clock while en is high. Their outputs go to the PUF
// cells' aggressor inputs (in hardware the coupling is physical; in the
// behavioural PUF model the number of transitions widens the jitter). Five
// flip-flops per bit and constant toggling follow the characterization set-up
// of the key generator; the reset value and the alternating starting phase
// (even flip-flops start at 0, odd ones at 1) are this design's choice.
//
// Interface: en gates the toggling; q[i][f] is flip-flop f of PUF bit i.
// Timing: every q bit inverts on each clock edge with en high.
module toggle_noise #(
  parameter int unsigned NUM_PUF = 508,
  parameter int unsigned NUM_TFF = 5
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               en,
  output logic [NUM_TFF-1:0] q [NUM_PUF]
);
  logic [NUM_TFF-1:0] phase0;
  always_comb
    for (int f = 0; f < int'(NUM_TFF); f++) phase0[f] = f[0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(NUM_PUF); i++) q[i] <= phase0;
    end else if (en) begin
      for (int i = 0; i < int'(NUM_PUF); i++) q[i] <= ~q[i];
    end
  end
endmodule
