// Three registers on a shared three-state bus.
//
// Registers R0..R2 (tri_reg) connect to one bus; en[i] lets Ri drive it and
// load[i] makes Ri take the bus value at the rising edge. An external
// three-state driver (ext_en, ext_data) can also drive the bus, which is how
// values enter the registers. bus shows the bus value. At most one driver
// may be enabled in a cycle; an assertion reports contention.
//
// The three registers on one bus with separate enable and load lines follow
// the notes' example; the external driver and the bus observation output
// are this design's additions (without them every register stays at its
// reset value of 0).
module tri_bus #(
  parameter int unsigned W = 1
) (
  input  logic         clk,
  input  logic         rst,
  input  logic [2:0]   en,
  input  logic [2:0]   load,
  input  logic         ext_en,
  input  logic [W-1:0] ext_data,
  output logic [W-1:0] bus
);

  tri [W-1:0] databus;

  for (genvar i = 0; i < 3; i++) begin : g_reg
    tri_reg #(.W(W)) u_reg (
      .clk, .rst, .en(en[i]), .load(load[i]), .data(databus)
    );
  end

  assign databus = ext_en ? ext_data : 'z;
  assign bus     = databus;

  a_one_driver: assert property (@(posedge clk) disable iff (rst)
                                 $countones({en, ext_en}) <= 1);

endmodule
