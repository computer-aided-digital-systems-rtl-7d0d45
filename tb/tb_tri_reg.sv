// Self-checking testbench of tri_reg.
//
// Two instances, the default 1-bit one and an 8-bit one, each on a wire
// shared with a testbench three-state driver. In a load cycle the
// testbench drives the wire (register disabled) and the register must take
// the value; in a drive cycle the testbench releases the wire and the
// register's value must appear on it. Reset must clear the register.
module tb_tri_reg;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic       rst, en1, ld1, en8, ld8, tb_en1, tb_en8;
  logic       tb_d1, m1;
  logic [7:0] tb_d8, m8;
  wire        bus1;
  wire  [7:0] bus8;

  tri_reg         dut1 (.clk, .rst, .en(en1), .load(ld1), .data(bus1));
  tri_reg #(.W(8)) dut8 (.clk, .rst, .en(en8), .load(ld8), .data(bus8));
  assign bus1 = tb_en1 ? tb_d1 : 1'bz;
  assign bus8 = tb_en8 ? tb_d8 : 8'bz;

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
    rst = 1; en1 = 0; ld1 = 0; en8 = 0; ld8 = 0; tb_en1 = 0; tb_en8 = 0; tb_d1 = 0; tb_d8 = 0;
    @(negedge clk); rst = 0; m1 = 0; m8 = 0;
    en1 = 1; en8 = 1; #1;
    check(8'(bus1), 8'h0, "1-bit reset value driven");
    check(bus8, 8'h0, "8-bit reset value driven");
    for (int n = 0; n < 1000; n++) begin
      @(negedge clk);
      // Load cycle: testbench drives, register listens.
      en1 = 0; en8 = 0; tb_en1 = 1; tb_en8 = 1;
      tb_d1 = 1'($urandom); tb_d8 = 8'($urandom);
      ld1 = $urandom % 2; ld8 = $urandom % 2;
      if (ld1) m1 = tb_d1;
      if (ld8) m8 = tb_d8;
      @(negedge clk);
      // Drive cycle: testbench releases, register drives.
      ld1 = 0; ld8 = 0; tb_en1 = 0; tb_en8 = 0; en1 = 1; en8 = 1; #1;
      check(8'(bus1), 8'(m1), "1-bit register drives the bus");
      check(bus8, m8, "8-bit register drives the bus");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
