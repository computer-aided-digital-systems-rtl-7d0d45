// Datapath of the block-transfer RAM.
//
// Three counters hold the transfer set-up: WCNT (word count, counts down),
// FROM and TO (addresses, count up). A counter is loaded from the Addr bus
// when cmd_we is high and Din[1:0] names it (0 WCNT, 1 FROM, 2 TO, 3 none).
// A 3-to-1 mux chooses the RAM address (Addr, FROM, TO) and a 2-to-1 mux
// the RAM write data (Din, or the RAM's own output fed back). The RAM write
// enable is the OR of the external we and the controller's fsm_we.
//
// The feedback copy works because the RAM latches address and data on the
// clock: the word read through FROM at one edge is on dout during the next
// cycle, where it is latched as write data together with the TO address.
//
// Structure (counters loaded from Addr through a decode of cmd_we and
// Din[1:0], muxes, OR gate, 64 x 8 sync RAM) follows the notes' datapath
// diagram; the decode codes and the counter clear on reset are this
// design's choices. Loads take priority over counting.
module xfer_datapath
  import xfer_pkg::*;
#(
  parameter int unsigned AW = 6,
  parameter int unsigned DW = 8
) (
  input  logic          clk,
  input  logic          reset,
  input  logic          we,
  input  logic          cmd_we,
  input  logic [AW-1:0] addr,
  input  logic [DW-1:0] din,
  output logic [DW-1:0] dout,
  input  addr_sel_e     addr_sel,
  input  data_sel_e     data_sel,
  input  logic          ce_from,
  input  logic          ce_to,
  input  logic          ce_words,
  input  logic          fsm_we,
  output logic [AW-1:0] cnt_words
);

  logic          ld_wcnt, ld_from, ld_to;
  logic [AW-1:0] from_q, to_q, ram_addr;
  logic [DW-1:0] ram_din;
  logic          ram_we;

  // Load decode.
  always_comb begin
    ld_wcnt = cmd_we && cmd_sel_e'(din[1:0]) == CMD_WCNT;
    ld_from = cmd_we && cmd_sel_e'(din[1:0]) == CMD_FROM;
    ld_to   = cmd_we && cmd_sel_e'(din[1:0]) == CMD_TO;
  end

  counter #(.W(AW), .DOWN(1'b1)) u_wcnt (
    .clk, .aclr(1'b0), .aload(1'b0), .sclr(reset), .sload(ld_wcnt),
    .en(ce_words), .d(addr), .q(cnt_words)
  );

  counter #(.W(AW), .DOWN(1'b0)) u_from (
    .clk, .aclr(1'b0), .aload(1'b0), .sclr(reset), .sload(ld_from),
    .en(ce_from), .d(addr), .q(from_q)
  );

  counter #(.W(AW), .DOWN(1'b0)) u_to (
    .clk, .aclr(1'b0), .aload(1'b0), .sclr(reset), .sload(ld_to),
    .en(ce_to), .d(addr), .q(to_q)
  );

  // Address and data muxes, write-enable OR.
  always_comb begin
    unique case (addr_sel)
      ADDR_FROM: ram_addr = from_q;
      ADDR_TO:   ram_addr = to_q;
      default:   ram_addr = addr;
    endcase
    ram_din = (data_sel == DATA_RAM) ? dout : din;
    ram_we  = we | fsm_we;
  end

  sync_ram #(.AW(AW), .DW(DW)) u_ram (
    .clk, .we(ram_we), .addr(ram_addr), .din(ram_din), .dout
  );

endmodule
