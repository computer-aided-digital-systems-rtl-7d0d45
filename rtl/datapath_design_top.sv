// Datapath design examples, side by side.
//
// The main design is the block-transfer RAM (xt_*): a 64 x 8 synchronous
// RAM that, besides normal reads and writes, copies a block of words from
// one address range to another under control of a three-state controller.
// Next to it stand the smaller datapath examples, each with its own ports:
//   mt_*  multiplexer-based transfer into a register (4 bit),
//   bt_*  bus-based transfer among three registers through a mux (8 bit),
//   tb3_* three registers on a three-state bus (1 bit),
//   car_* counter-addressed asynchronous RAM with clock-gated write enable,
//   csr_* counter-addressed synchronous RAM,
//   sro_* synchronous RAM with registered inputs and registered output.
// The RAM examples are 16 x 4 as in the timing examples of the notes. All
// share clk; each has its own reset. None of them interact.
module datapath_design_top (
  input  logic       clk,

  // Block-transfer RAM.
  input  logic       xt_reset,
  input  logic       xt_we,
  input  logic       xt_cmd_we,
  input  logic [5:0] xt_addr,
  input  logic [7:0] xt_din,
  input  logic       xt_xfer,
  output logic [7:0] xt_dout,
  output logic       xt_busy,
  output logic [1:0] xt_state,
  output logic [5:0] xt_cnt_words,

  // Multiplexer-based transfer.
  input  logic       mt_rst,
  input  logic       mt_ld1,
  input  logic [3:0] mt_d1,
  input  logic       mt_ld2,
  input  logic [3:0] mt_d2,
  input  logic       mt_k1,
  input  logic       mt_k2,
  output logic [3:0] mt_r0,
  output logic [3:0] mt_r1,
  output logic [3:0] mt_r2,

  // Bus-based transfer.
  input  logic       bt_rst,
  input  logic [1:0] bt_sel,
  input  logic [2:0] bt_load,
  input  logic [7:0] bt_ext,
  output logic [7:0] bt_bus,
  output logic [7:0] bt_r [3],

  // Three-state bus.
  input  logic       tb3_rst,
  input  logic [2:0] tb3_en,
  input  logic [2:0] tb3_load,
  input  logic       tb3_ext_en,
  input  logic       tb3_ext_data,
  output logic       tb3_bus,

  // Counter-addressed asynchronous RAM.
  input  logic       car_rst,
  input  logic       car_cnt_en,
  input  logic       car_we,
  input  logic [3:0] car_din,
  output logic [3:0] car_addr,
  output logic [3:0] car_dout,

  // Counter-addressed synchronous RAM.
  input  logic       csr_rst,
  input  logic       csr_cnt_en,
  input  logic       csr_we,
  input  logic [3:0] csr_din,
  output logic [3:0] csr_addr,
  output logic [3:0] csr_dout,

  // Synchronous RAM with registered output.
  input  logic       sro_outclock,
  input  logic       sro_we,
  input  logic [3:0] sro_addr,
  input  logic [3:0] sro_din,
  output logic [3:0] sro_q
);

  xfer_pkg::xfer_state_e xt_state_e;

  xfer_ram #(.AW(6), .DW(8)) u_xfer_ram (
    .clk, .reset(xt_reset), .we(xt_we), .cmd_we(xt_cmd_we), .addr(xt_addr),
    .din(xt_din), .xfer(xt_xfer), .dout(xt_dout), .busy(xt_busy),
    .state(xt_state_e), .cnt_words(xt_cnt_words)
  );
  assign xt_state = xt_state_e;

  mux_transfer #(.W(4)) u_mux_transfer (
    .clk, .rst(mt_rst), .ld1(mt_ld1), .d1(mt_d1), .ld2(mt_ld2), .d2(mt_d2),
    .k1(mt_k1), .k2(mt_k2), .r0(mt_r0), .r1(mt_r1), .r2(mt_r2)
  );

  bus_transfer #(.W(8)) u_bus_transfer (
    .clk, .rst(bt_rst), .sel(bt_sel), .load(bt_load), .ext(bt_ext),
    .bus(bt_bus), .r(bt_r)
  );

  tri_bus #(.W(1)) u_tri_bus (
    .clk, .rst(tb3_rst), .en(tb3_en), .load(tb3_load), .ext_en(tb3_ext_en),
    .ext_data(tb3_ext_data), .bus(tb3_bus)
  );

  counter_async_ram #(.AW(4), .DW(4)) u_counter_async_ram (
    .clk, .rst(car_rst), .cnt_en(car_cnt_en), .we(car_we), .din(car_din),
    .addr(car_addr), .dout(car_dout)
  );

  counter_sync_ram #(.AW(4), .DW(4)) u_counter_sync_ram (
    .clk, .rst(csr_rst), .cnt_en(csr_cnt_en), .we(csr_we), .din(csr_din),
    .addr(csr_addr), .dout(csr_dout)
  );

  sync_ram_oreg #(.AW(4), .DW(4)) u_sync_ram_oreg (
    .inclock(clk), .outclock(sro_outclock), .we(sro_we), .addr(sro_addr),
    .din(sro_din), .q(sro_q)
  );

endmodule
