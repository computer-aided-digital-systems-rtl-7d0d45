// Shared types of the block-transfer RAM.
//
// The controller drives two mux selects and walks through three states.
// The state names follow the controller's ASM chart (S0 idle, S1 read,
// S2 write); the numeric codes of the selects are this design's choice.
package xfer_pkg;

  // Source of the RAM address.
  typedef enum logic [1:0] {
    ADDR_CPU  = 2'd0,  // external Addr bus (normal RAM operation)
    ADDR_FROM = 2'd1,  // FROM counter (read side of a transfer)
    ADDR_TO   = 2'd2   // TO counter   (write side of a transfer)
  } addr_sel_e;

  // Source of the RAM write data.
  typedef enum logic {
    DATA_CPU = 1'b0,   // external Din bus
    DATA_RAM = 1'b1    // RAM output fed back to its input
  } data_sel_e;

  // Controller states.
  typedef enum logic [1:0] {
    S0_IDLE  = 2'd0,   // wait for xfer
    S1_READ  = 2'd1,   // read through FROM, FROM++, WCNT--
    S2_WRITE = 2'd2    // write through TO, TO++, loop or finish
  } xfer_state_e;

  // Counter selected by Din[1:0] when cmd_we loads a counter.
  typedef enum logic [1:0] {
    CMD_WCNT = 2'd0,
    CMD_FROM = 2'd1,
    CMD_TO   = 2'd2,
    CMD_NONE = 2'd3
  } cmd_sel_e;

endpackage
