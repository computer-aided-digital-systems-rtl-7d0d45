// Synchronous RAM with registered inputs and a registered output.
//
// Address, write data and write enable are latched on the rising edge of
// inclock (a write is committed there). The word at the latched address is
// then latched into the output register on the rising edge of outclock.
// With both clocks tied together, read data appears two edges after the
// address is applied.
//
// The two clocks and the 16 x 4 default size follow the notes' timing
// example; the output register has no reset (its first value is unknown
// until a read has passed through it).
module sync_ram_oreg #(
  parameter int unsigned AW = 4,
  parameter int unsigned DW = 4
) (
  input  logic          inclock,
  input  logic          outclock,
  input  logic          we,
  input  logic [AW-1:0] addr,
  input  logic [DW-1:0] din,
  output logic [DW-1:0] q
);

  logic [DW-1:0] mem [2**AW];
  logic [AW-1:0] addr_q;

  always_ff @(posedge inclock) begin
    if (we) mem[addr] <= din;
    addr_q <= addr;
  end

  always_ff @(posedge outclock) q <= mem[addr_q];

endmodule
