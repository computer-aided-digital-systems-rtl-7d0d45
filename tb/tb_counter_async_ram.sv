// Self-checking testbench of counter_async_ram (16 x 4).
//
// Plays the controller: inputs change 1 time unit after each rising edge,
// as a flip-flop output would. In each write cycle we and cnt_en are both
// high, so the counter moves to the next address at the same edge that
// ends the write. Gating we with the inverted clock must keep the write to
// the old address only; every word of the RAM is checked afterwards
// against a reference array, through the combinational read port.
module tb_counter_async_ram;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic       rst, cnt_en, we;
  logic [3:0] din, addr, dout, model [16];
  counter_async_ram dut (.clk, .rst, .cnt_en, .we, .din, .addr, .dout);

  // Independent model of the address counter, checked every clock.
  logic [3:0] m_addr;
  always @(posedge clk) begin
    if (rst)         m_addr <= 4'h0;
    else if (cnt_en) m_addr <= m_addr + 4'h1;
  end
  always @(negedge clk) if (!rst) check(addr, m_addr, "counter address");

  task automatic check(input logic [3:0] got, input logic [3:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [3:0] a;
    rst = 1; cnt_en = 0; we = 0; din = 0;
    @(posedge clk); #1 rst = 0;
    check(addr, 4'h0, "counter cleared");
    for (int pass = 0; pass < 20; pass++) begin
      // Fill all 16 words back to back, one per clock.
      for (int i = 0; i < 16; i++) begin
        we = 1; cnt_en = 1; din = 4'($urandom); model[m_addr] = din;
        @(posedge clk); #1;
      end
      we = 0; cnt_en = 0;
      // Random sparse writes with the counter sometimes moving.
      for (int i = 0; i < 16; i++) begin
        we = $urandom % 2; cnt_en = $urandom % 2; din = 4'($urandom);
        if (we) model[m_addr] = din;
        @(posedge clk); #1;
      end
      we = 0;
      // Read every word by stepping the counter around once.
      for (int i = 0; i < 16; i++) begin
        a = m_addr;
        check(dout, model[a], $sformatf("word %0d", a));
        cnt_en = 1;
        @(posedge clk); #1;
      end
      cnt_en = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
