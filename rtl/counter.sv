// Loadable up/down binary counter with synchronous and asynchronous
// controls.
//
// Priority, highest first: aclr (asynchronous clear), aload (asynchronous
// load of d), sclr (synchronous clear), sload (synchronous load of d),
// en (count by one). DOWN selects the direction; the count wraps at the
// ends of its range. All synchronous actions happen on the rising edge.
//
// The set of controls (aclr, aload, sclr, sload, count enable) follows the
// notes' description of a library counter; the notes advise using the
// synchronous ones, which is all the block-transfer RAM uses. Priority
// order and wrap-around are this design's choices.
module counter #(
  parameter int unsigned W    = 6,
  parameter bit          DOWN = 1'b0
) (
  input  logic         clk,
  input  logic         aclr,
  input  logic         aload,
  input  logic         sclr,
  input  logic         sload,
  input  logic         en,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);

  // Both asynchronous controls share one asynchronous load whose value is
  // 0 for aclr and d for aload.
  logic         async_ld;
  logic [W-1:0] async_val;

  assign async_ld  = aclr | aload;
  assign async_val = aclr ? '0 : d;

  always_ff @(posedge clk or posedge async_ld) begin
    if (async_ld)   q <= async_val;
    else if (sclr)  q <= '0;
    else if (sload) q <= d;
    else if (en)    q <= DOWN ? q - 1'b1 : q + 1'b1;
  end

endmodule
