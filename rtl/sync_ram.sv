// Synchronous RAM with registered inputs and an unregistered output.
//
// On each rising edge of clk the RAM latches address, write enable and
// write data; a write is committed at that edge. The output is the word
// at the latched address, so read data appears one clock after the
// address is applied (the extra cycle of latency a counter-driven address
// sees). A word written at an edge is visible on dout right after it.
//
// Default size 64 x 8 is the block-transfer case study's RAM. Latching of
// the inputs and the unlatched output follow the notes; the write-first
// behaviour on a simultaneous read of the written word is this design's
// choice. The contents are not reset.
module sync_ram #(
  parameter int unsigned AW = 6,
  parameter int unsigned DW = 8
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] addr,
  input  logic [DW-1:0] din,
  output logic [DW-1:0] dout
);

  logic [DW-1:0] mem [2**AW];
  logic [AW-1:0] addr_q;

  always_ff @(posedge clk) begin
    if (we) mem[addr] <= din;
    addr_q <= addr;
  end

  assign dout = mem[addr_q];

endmodule
