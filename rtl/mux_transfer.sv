// Multiplexer-based register transfer.
//
// Register R0 receives data from two sources, R1 and R2, at different
// times. A 2-to-1 mux in front of R0 is selected by K1 (1: R1, 0: R2), and
// R0 loads on K1 OR K2. If K1 and K2 are both high, R1 wins. R1 and R2 are
// loaded from outside through ld1/d1 and ld2/d2. Every register changes on
// the rising edge; rst clears all three synchronously.
//
// The mux, its input order, the OR'd load and the 4-bit width follow the
// notes' figure; the external load ports of R1 and R2 and the reset are
// this design's additions so the example can be driven.
module mux_transfer #(
  parameter int unsigned W = 4
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         ld1,
  input  logic [W-1:0] d1,
  input  logic         ld2,
  input  logic [W-1:0] d2,
  input  logic         k1,
  input  logic         k2,
  output logic [W-1:0] r0,
  output logic [W-1:0] r1,
  output logic [W-1:0] r2
);

  logic [W-1:0] mux_out;
  logic         load_r0;

  assign mux_out = k1 ? r1 : r2;
  assign load_r0 = k1 | k2;

  always_ff @(posedge clk) begin
    if (rst) begin
      r0 <= '0;
      r1 <= '0;
      r2 <= '0;
    end else begin
      if (load_r0) r0 <= mux_out;
      if (ld1)     r1 <= d1;
      if (ld2)     r2 <= d2;
    end
  end

endmodule
