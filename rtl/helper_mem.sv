// helper_mem: storage for the public helper data H_i of the code-offset
// fuzzy extractor, one N-bit word per key block.
//
// Helper data is written once at enrollment and read at every key generation.
// It reveals nothing about the key as long as the PUF bits stay secret, so it
// may also be exported to and restored from off-chip storage. The memory is a
// plain single-port array with a synchronous read (one block RAM or
// distributed RAM); word width and depth follow the key configuration, the
// port style is this design's choice.
//
// Interface: en with we writes wdata to addr; en without we reads addr, and
// rdata is valid on the following clock and holds until the next read.
module helper_mem #(
  parameter int unsigned N          = 127,
  parameter int unsigned NUM_BLOCKS = 4,
  parameter int unsigned AW         = (NUM_BLOCKS > 1) ? $clog2(NUM_BLOCKS) : 1
) (
  input  logic          clk,
  input  logic          en,
  input  logic          we,
  input  logic [AW-1:0] addr,
  input  logic [N-1:0]  wdata,
  output logic [N-1:0]  rdata
);
  logic [N-1:0] mem [NUM_BLOCKS];

  always_ff @(posedge clk) begin
    if (en) begin
      if (we) mem[addr] <= wdata;
      else    rdata     <= mem[addr];
    end
  end

  always_ff @(posedge clk)
    if (en) assert (int'(addr) < int'(NUM_BLOCKS))
      else $error("helper_mem: address %0d out of range", addr);
endmodule
