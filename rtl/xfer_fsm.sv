// Controller of the block-transfer RAM (a three-state Moore machine).
//
//   S0_IDLE : address and data muxes select the external buses; wait for
//             xfer.
//   S1_READ : busy; address mux selects the FROM counter, data mux the RAM
//             output; FROM counts up and WCNT counts down.
//   S2_WRITE: busy; address mux selects the TO counter, data mux the RAM
//             output, fsm_we is high; TO counts up. Back to S0_IDLE when
//             cnt_words (already decremented in S1) is 0, else to S1_READ.
//
// One word therefore costs two clocks; a read and a write cannot share a
// cycle of the single-port RAM. All outputs decode the state register only,
// so they are glitch-free flip-flop functions. reset is synchronous.
//
// States, outputs and transitions follow the notes' ASM chart; the binary
// codes of the states and selects (xfer_pkg) are this design's choice. The
// state is brought out for debugging, as the notes recommend.
module xfer_fsm
  import xfer_pkg::*;
#(
  parameter int unsigned CW = 6
) (
  input  logic          clk,
  input  logic          reset,
  input  logic          xfer,
  input  logic [CW-1:0] cnt_words,
  output logic          busy,
  output addr_sel_e     addr_sel,
  output data_sel_e     data_sel,
  output logic          ce_from,
  output logic          ce_to,
  output logic          ce_words,
  output logic          fsm_we,
  output xfer_state_e   state
);

  xfer_state_e state_n;

  always_ff @(posedge clk) begin
    if (reset) state <= S0_IDLE;
    else       state <= state_n;
  end

  always_comb begin
    state_n = state;
    unique case (state)
      S0_IDLE:  if (xfer) state_n = S1_READ;
      S1_READ:  state_n = S2_WRITE;
      S2_WRITE: state_n = (cnt_words == '0) ? S0_IDLE : S1_READ;
      default:  state_n = S0_IDLE;
    endcase
  end

  always_comb begin
    busy     = 1'b0;
    addr_sel = ADDR_CPU;
    data_sel = DATA_CPU;
    ce_from  = 1'b0;
    ce_to    = 1'b0;
    ce_words = 1'b0;
    fsm_we   = 1'b0;
    unique case (state)
      S1_READ: begin
        busy     = 1'b1;
        addr_sel = ADDR_FROM;
        data_sel = DATA_RAM;
        ce_from  = 1'b1;
        ce_words = 1'b1;
      end
      S2_WRITE: begin
        busy     = 1'b1;
        addr_sel = ADDR_TO;
        data_sel = DATA_RAM;
        ce_to    = 1'b1;
        fsm_we   = 1'b1;
      end
      default: ;
    endcase
  end

  // The unused fourth state code is never entered.
  a_legal_state: assert property (@(posedge clk) disable iff (reset)
                                  state inside {S0_IDLE, S1_READ, S2_WRITE});

endmodule
