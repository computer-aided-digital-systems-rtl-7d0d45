// Asynchronous RAM: no clock, combinational read, level-sensitive write.
//
// dout shows the word at addr after the combinational delay. While we is
// high the addressed word is transparent to din (each word is a latch), so
// the address and data must be held stable for the whole time we is high,
// or more than one word is written. Callers that drive addr from a counter
// gate we with the inverted clock (see counter_async_ram).
//
// The 16 x 4 default size is the notes' timing example. Modelling each
// word as a latch is this design's choice.
module async_ram #(
  parameter int unsigned AW = 4,
  parameter int unsigned DW = 4
) (
  input  logic          we,
  input  logic [AW-1:0] addr,
  input  logic [DW-1:0] din,
  output logic [DW-1:0] dout
);

  logic [DW-1:0] mem [2**AW];

  for (genvar i = 0; i < 2**AW; i++) begin : g_word
    always_latch begin
      if (we && addr == AW'(i)) mem[i] = din;
    end
  end

  assign dout = mem[addr];

endmodule
