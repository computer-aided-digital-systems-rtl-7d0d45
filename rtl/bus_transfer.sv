// Bus-based register transfer through a multiplexer.
//
// Three registers R0..R2 share one bus driven by a 3-to-1 mux: sel = 0, 1
// or 2 puts R0, R1 or R2 on the bus. Any register whose load line (load[i])
// is high takes the bus value at the rising edge, so one source can reach
// several destinations in the same cycle. sel = 3 puts the external value
// ext on the bus, the only way to give the registers a value. rst clears
// the registers synchronously.
//
// The three registers, the 3-to-1 mux and the per-register load lines
// follow the notes' figure; the width (8), the fourth mux input for ext and
// the reset are this design's choices.
module bus_transfer #(
  parameter int unsigned W = 8
) (
  input  logic         clk,
  input  logic         rst,
  input  logic [1:0]   sel,
  input  logic [2:0]   load,
  input  logic [W-1:0] ext,
  output logic [W-1:0] bus,
  output logic [W-1:0] r [3]
);

  always_comb begin
    unique case (sel)
      2'd0:    bus = r[0];
      2'd1:    bus = r[1];
      2'd2:    bus = r[2];
      default: bus = ext;
    endcase
  end

  always_ff @(posedge clk) begin
    for (int i = 0; i < 3; i++) begin
      if (rst)          r[i] <= '0;
      else if (load[i]) r[i] <= bus;
    end
  end

endmodule
