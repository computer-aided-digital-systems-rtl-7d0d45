// Self-checking testbench of mux_transfer (4 bit).
//
// Random loads of R1 and R2 and random K1/K2 pulses; a reference model
// loads R0 with R1 when K1, with R2 when only K2, and holds it otherwise.
module tb_mux_transfer;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic       rst, ld1, ld2, k1, k2;
  logic [3:0] d1, d2, r0, r1, r2, m0, m1, m2;
  mux_transfer dut (.clk, .rst, .ld1, .d1, .ld2, .d2, .k1, .k2, .r0, .r1, .r2);

  task automatic check(input logic [3:0] got, input logic [3:0] exp, input string what);
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
    rst = 1; ld1 = 0; ld2 = 0; k1 = 0; k2 = 0; d1 = 0; d2 = 0;
    @(negedge clk); rst = 0; m0 = 0; m1 = 0; m2 = 0;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      ld1 = $urandom % 2; ld2 = $urandom % 2; d1 = 4'($urandom); d2 = 4'($urandom);
      k1 = ($urandom % 3) == 0; k2 = ($urandom % 3) == 0;
      @(posedge clk);
      if (k1)      m0 = m1;
      else if (k2) m0 = m2;
      if (ld1) m1 = d1;
      if (ld2) m2 = d2;
      #1;
      check(r0, m0, "R0"); check(r1, m1, "R1"); check(r2, m2, "R2");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
