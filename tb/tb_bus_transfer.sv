// Self-checking testbench of bus_transfer (8 bit).
//
// Random select and load patterns, including one source to several
// destinations in a cycle; a reference model predicts the bus value before
// each edge and the three registers after it.
module tb_bus_transfer;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic       rst;
  logic [1:0] sel;
  logic [2:0] load;
  logic [7:0] ext, bus, r [3], m [3], mbus;
  bus_transfer dut (.clk, .rst, .sel, .load, .ext, .bus, .r);

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
    rst = 1; sel = 0; load = 0; ext = 0;
    @(negedge clk); rst = 0; m = '{8'h0, 8'h0, 8'h0};
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      sel = 2'($urandom); load = 3'($urandom); ext = 8'($urandom);
      mbus = (sel == 2'd3) ? ext : m[sel];
      #1 check(bus, mbus, "bus");
      @(posedge clk);
      for (int i = 0; i < 3; i++) if (load[i]) m[i] = mbus;
      #1;
      for (int i = 0; i < 3; i++) check(r[i], m[i], $sformatf("R%0d", i));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
