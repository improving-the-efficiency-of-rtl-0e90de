// puf_array: the bank of PUF cells used for key generation, each cell placed
// at a site chosen for this particular chip.
//
// Variation-aware placement: a chip offers NUM_LOC candidate PUF sites. After
// the chip's per-site bit error rates have been measured, the NUM_PUF most
// reliable sites are chosen and the cells are placed there. loc_map[i] is the
// site of cell i; in an FPGA it is fixed by placement constraints in the
// per-device bitstream, here it is a static input so that one netlist can be
// simulated with any placement (variation-agnostic placement is simply
// loc_map[i] = i). Keeping bad sites out of the bank lowers the bit error rate
// the error-correcting code must handle.
//
// An evaluation (eval pulse) enables all cells for EVAL_CLKS clocks (the
// first clock primes the shift registers, the next ones race), then registers
// the cell outputs into w and pulses valid. The number of candidate sites
// and the use of a per-chip site selection follow the key generator; the
// evaluation sequencing is this design's choice.
//
// Interface: eval is accepted when busy is low; w holds the last reading.
// Timing: valid is high EVAL_CLKS + 2 clocks after eval is applied, counting
// the clock edge that takes eval (4 clocks by default).
module puf_array #(
  parameter int unsigned  NUM_PUF     = 508,
  parameter int unsigned  NUM_LOC     = 2080,
  parameter int unsigned  LOC_W       = $clog2(NUM_LOC),
  parameter int unsigned  NUM_TFF     = 5,
  parameter int unsigned  CHAIN_LUTS  = 5,
  parameter int unsigned  EVAL_CLKS   = 2,
  parameter logic [31:0]  DEVICE_SEED = 32'h1234_5678
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               eval,
  input  logic [LOC_W-1:0]   loc_map [NUM_PUF],
  input  logic [NUM_TFF-1:0] aggr    [NUM_PUF],
  output logic               busy,
  output logic               valid,
  output logic [NUM_PUF-1:0] w
);
  logic                 cell_en;
  logic [NUM_PUF-1:0]   cell_q;
  logic [$clog2(EVAL_CLKS+1)-1:0] cnt_q;

  for (genvar i = 0; i < int'(NUM_PUF); i++) begin : g_cell
    anderson_puf_cell #(
      .CHAIN_LUTS (CHAIN_LUTS),
      .NUM_AGGR   (NUM_TFF),
      .LOC_W      (LOC_W),
      .DEVICE_SEED(DEVICE_SEED)
    ) u_cell (
      .clk (clk),
      .rst_n(rst_n),
      .en  (cell_en),
      .loc (loc_map[i]),
      .aggr(aggr[i]),
      .q   (cell_q[i])
    );
  end

  assign cell_en = busy && (cnt_q != 0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy  <= 1'b0;
      valid <= 1'b0;
      cnt_q <= '0;
      w     <= '0;
    end else begin
      valid <= 1'b0;
      if (!busy) begin
        if (eval) begin
          busy  <= 1'b1;
          cnt_q <= ($clog2(EVAL_CLKS+1))'(EVAL_CLKS);
        end
      end else if (cnt_q != 0) begin
        cnt_q <= cnt_q - 1'b1;
      end else begin
        w     <= cell_q;
        valid <= 1'b1;
        busy  <= 1'b0;
      end
    end
  end

  // every cell must sit on an existing site
  always_ff @(posedge clk)
    if (eval && !busy)
      for (int i = 0; i < int'(NUM_PUF); i++)
        assert (int'(loc_map[i]) < int'(NUM_LOC))
          else $error("puf_array: cell %0d placed at site %0d", i, loc_map[i]);
endmodule
