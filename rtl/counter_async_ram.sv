// Counter-addressed asynchronous RAM with the write enable gated by the
// inverted clock.
//
// A counter (advanced by cnt_en at the rising edge) drives the address of
// an asynchronous RAM. The address changes just after each rising edge, so
// a write enable held for a whole cycle would also be active while the
// address moves and could write two words. Here the RAM sees we AND NOT clk:
// the write happens only in the second (low) half of the cycle, when the
// address has settled, and ends at the rising edge, before the counter
// output changes. This relies on the AND gate being faster than the
// counter's clock-to-output delay.
//
// The counter, the async RAM and the gating follow the notes; the sizes
// (16 x 4, as in the notes' timing example) and the counter clear on rst
// are this design's choices. The clock reaching a data input of the RAM is
// the point of the example.
module counter_async_ram #(
  parameter int unsigned AW = 4,
  parameter int unsigned DW = 4
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          cnt_en,
  input  logic          we,
  input  logic [DW-1:0] din,
  output logic [AW-1:0] addr,
  output logic [DW-1:0] dout
);

  logic ram_we;

  counter #(.W(AW), .DOWN(1'b0)) u_cnt (
    .clk, .aclr(1'b0), .aload(1'b0), .sclr(rst), .sload(1'b0),
    .en(cnt_en), .d('0), .q(addr)
  );

  assign ram_we = we & ~clk;

  async_ram #(.AW(AW), .DW(DW)) u_ram (
    .we(ram_we), .addr, .din, .dout
  );

endmodule
