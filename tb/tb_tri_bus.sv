// Self-checking testbench of tri_bus (8-bit and default 1-bit instances).
//
// Each cycle exactly one driver is enabled (one of the three registers or
// the external driver) and a random set of registers loads the bus. A
// reference model predicts the bus value and, through later drive cycles,
// every register's content.
module tb_tri_bus;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic       rst, ext_en;
  logic [2:0] en, load;
  logic [7:0] ext_data, bus8, m [3], mbus;
  logic       bus1;

  tri_bus #(.W(8)) dut8 (.clk, .rst, .en, .load, .ext_en, .ext_data, .bus(bus8));
  tri_bus          dut1 (.clk, .rst, .en, .load, .ext_en, .ext_data(ext_data[0]), .bus(bus1));

  task automatic check(input logic [7:0] got, input logic [7:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int src;
    rst = 1; en = 0; load = 0; ext_en = 1; ext_data = 0;
    @(negedge clk); rst = 0; m = '{8'h0, 8'h0, 8'h0};
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      src = (n < 10) ? 3 : $urandom % 4;   // start by filling from outside
      en = 3'b000; ext_en = 0;
      if (src == 3) ext_en = 1; else en[src] = 1'b1;
      ext_data = 8'($urandom);
      load = 3'($urandom);
      mbus = (src == 3) ? ext_data : m[src];
      #1;
      check(bus8, mbus, "8-bit bus value");
      check(8'(bus1), 8'(mbus[0]), "1-bit bus value");
      @(posedge clk);
      for (int i = 0; i < 3; i++) if (load[i]) m[i] = mbus;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
