// Self-checking testbench of xfer_ram at its default size (64 x 8).
//
// Fills the RAM through the normal port, then runs block transfers of
// random length, source and destination (overlapping ranges included,
// copied in ascending order). A reference array predicts the RAM after
// each transfer; the whole RAM is read back and compared. busy must rise
// one clock after xfer and stay high for exactly 2*WCNT clocks. The last
// transfer copies the largest block that fits without wrapping: 63 words.
module tb_xfer_ram;
  import xfer_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic        reset, we, cmd_we, xfer, busy;
  logic [5:0]  addr, cnt_words;
  logic [7:0]  din, dout;
  xfer_state_e state;
  logic [7:0]  model [64];

  xfer_ram dut (.clk, .reset, .we, .cmd_we, .addr, .din, .xfer, .dout, .busy, .state, .cnt_words);

  task automatic check(input logic [7:0] got, input logic [7:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  task automatic load(input cmd_sel_e which, input logic [5:0] value);
    @(negedge clk); we = 0; cmd_we = 1; addr = value; din = {6'h00, which};
    @(negedge clk); cmd_we = 0;
  endtask

  task automatic read_all();
    for (int i = 0; i < 64; i++) begin
      @(negedge clk); we = 0; addr = 6'(i);
      @(negedge clk);
      check(dout, model[i], $sformatf("word %0d", i));
    end
  endtask

  task automatic transfer(input int n, input int from, input int to);
    int cycles;
    load(CMD_WCNT, 6'(n)); load(CMD_FROM, 6'(from)); load(CMD_TO, 6'(to));
    for (int w = 0; w < n; w++) model[6'(to + w)] = model[6'(from + w)];
    @(negedge clk); xfer = 1;
    check(8'(busy), 8'h0, "busy low before the start edge");
    @(negedge clk); xfer = 0;
    cycles = 0;
    while (busy && cycles < 1000) begin
      cycles++;
      @(negedge clk);
    end
    check(8'(cycles), 8'(2 * n), $sformatf("busy cycles for %0d words", n));
    check(8'(state), 8'(S0_IDLE), "idle after transfer");
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    reset = 1; we = 0; cmd_we = 0; xfer = 0; addr = 0; din = 0;
    @(negedge clk); @(negedge clk); reset = 0;
    for (int i = 0; i < 64; i++) begin
      @(negedge clk); we = 1; addr = 6'(i); din = 8'($urandom); model[i] = din;
    end
    @(negedge clk); we = 0;
    read_all();
    transfer(8, 0, 32);            // disjoint ranges
    read_all();
    transfer(1, 63, 0);            // single word
    read_all();
    transfer(6, 10, 12);           // overlapping, destination above source
    read_all();
    transfer(6, 20, 17);           // overlapping, destination below source
    read_all();
    for (int t = 0; t < 10; t++) begin
      transfer(1 + ($urandom % 40), $urandom % 64, $urandom % 64);
      read_all();
    end
    transfer(63, 0, 1);            // largest non-wrapping block
    read_all();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
