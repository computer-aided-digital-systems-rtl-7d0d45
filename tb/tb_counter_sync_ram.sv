// Self-checking testbench of counter_sync_ram (16 x 4).
//
// Inputs change on the falling edge. Writes with the counter advancing
// every cycle must land one word per address; reads stepping the counter
// show each word one clock after the counter shows its address (the extra
// cycle of latency of a synchronous RAM).
module tb_counter_sync_ram;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic       rst, cnt_en, we;
  logic [3:0] din, addr, dout, model [16], prev_addr;
  counter_sync_ram dut (.clk, .rst, .cnt_en, .we, .din, .addr, .dout);

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
    rst = 1; cnt_en = 0; we = 0; din = 0;
    @(negedge clk); rst = 0;
    @(negedge clk);
    check(addr, 4'h0, "counter cleared");
    for (int pass = 0; pass < 20; pass++) begin
      for (int i = 0; i < 16; i++) begin
        we = 1; cnt_en = 1; din = 4'($urandom); model[m_addr] = din;
        @(negedge clk);
      end
      we = 0;
      cnt_en = 1;
      for (int i = 0; i < 17; i++) begin
        prev_addr = m_addr;
        @(negedge clk);
        // dout now shows the word of the address latched at the last edge.
        check(dout, model[prev_addr], $sformatf("word %0d one clock later", prev_addr));
      end
      cnt_en = 0;
      for (int i = 0; i < 8; i++) begin
        we = $urandom % 2; cnt_en = $urandom % 2; din = 4'($urandom);
        if (we) model[m_addr] = din;
        @(negedge clk);
      end
      we = 0; cnt_en = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
