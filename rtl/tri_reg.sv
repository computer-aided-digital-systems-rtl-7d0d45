// Register with a three-state bidirectional port.
//
// On the rising edge the register clears when rst is high, else loads the
// value on data when load is high. While en is high it drives its value
// onto data; while en is low data is released (high impedance) so that
// another driver can use the shared bus. Loading while en is high reloads
// the register's own value.
//
// Behaviour follows the notes' three-state register (synchronous reset,
// load from the port, drive on EN); the width parameter (default 1, as in
// the notes' example) is this design's generalisation.
module tri_reg #(
  parameter int unsigned W = 1
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         en,
  input  logic         load,
  inout  wire  [W-1:0] data
);

  logic [W-1:0] q;

  always_ff @(posedge clk) begin
    if (rst)       q <= '0;
    else if (load) q <= data;
  end

  assign data = en ? q : 'z;

endmodule
