// Counter-addressed synchronous RAM.
//
// A counter (advanced by cnt_en at the rising edge) drives the address of
// a synchronous RAM. The RAM latches address, data and write enable at the
// same edge, so no clock gating is needed: a write enable held for the
// cycle writes exactly the word the counter showed before the edge. Read
// data has one cycle of extra latency: dout shows the word for the address
// the counter held at the previous edge.
//
// The structure follows the notes' synchronous RAM example; the 16 x 4
// size and the counter clear on rst are this design's choices.
module counter_sync_ram #(
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

  counter #(.W(AW), .DOWN(1'b0)) u_cnt (
    .clk, .aclr(1'b0), .aload(1'b0), .sclr(rst), .sload(1'b0),
    .en(cnt_en), .d('0), .q(addr)
  );

  sync_ram #(.AW(AW), .DW(DW)) u_ram (
    .clk, .we, .addr, .din, .dout
  );

endmodule
