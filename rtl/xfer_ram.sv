// 64 x 8 synchronous RAM with a block-transfer capability.
//
// Normal use: we, addr and din write and read the RAM as a plain
// synchronous RAM (dout shows the word addressed at the previous edge).
//
// Block transfer: first load the three counters with cmd_we = 1, the value
// on addr and the counter code on din[1:0] (0 WCNT word count, 1 FROM source
// address, 2 TO destination address). Then pulse xfer. busy rises on the
// next edge and stays high for 2*WCNT clocks while WCNT words are copied,
// one read cycle and one write cycle each, from FROM.. to TO.. in
// ascending order. Keep we low and leave xfer/cmd_we alone while busy.
// The controller state and the word counter are brought out for
// observation. A WCNT of 0 copies 2**AW words (the counter wraps).
//
// The function, the split into datapath and three-state controller and
// the 64 x 8 size follow the notes' case study; the counter-load encoding
// and the observation ports are this design's choices.
module xfer_ram
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
  input  logic          xfer,
  output logic [DW-1:0] dout,
  output logic          busy,
  output xfer_state_e   state,
  output logic [AW-1:0] cnt_words
);

  addr_sel_e addr_sel;
  data_sel_e data_sel;
  logic      ce_from, ce_to, ce_words, fsm_we;

  xfer_datapath #(.AW(AW), .DW(DW)) u_dp (
    .clk, .reset, .we, .cmd_we, .addr, .din, .dout,
    .addr_sel, .data_sel, .ce_from, .ce_to, .ce_words, .fsm_we, .cnt_words
  );

  xfer_fsm #(.CW(AW)) u_fsm (
    .clk, .reset, .xfer, .cnt_words, .busy,
    .addr_sel, .data_sel, .ce_from, .ce_to, .ce_words, .fsm_we, .state
  );

  // The counters are set up before a transfer starts, and the external
  // write port stays idle while the controller owns the RAM.
  a_idle_port_while_busy: assert property (@(posedge clk) disable iff (reset)
                                           busy |-> !we && !cmd_we);

endmodule
