// Self-checking testbench of xfer_datapath.
//
// The testbench plays the controller itself. It writes the RAM through the
// external port, loads WCNT, FROM and TO through cmd_we with the counter
// code on din[1:0], reads words back, and then performs one read/write
// pair per word by hand (FROM address with ce_from/ce_words, then TO
// address with ce_to/fsm_we and the RAM output fed back as write data).
// A reference array predicts every RAM word, and cnt_words is checked
// after each decrement.
module tb_xfer_datapath;
  import xfer_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic       reset, we, cmd_we, ce_from, ce_to, ce_words, fsm_we;
  logic [5:0] addr, cnt_words;
  logic [7:0] din, dout;
  addr_sel_e  addr_sel;
  data_sel_e  data_sel;
  logic [7:0] model [64];

  xfer_datapath dut (.clk, .reset, .we, .cmd_we, .addr, .din, .dout, .addr_sel, .data_sel,
                     .ce_from, .ce_to, .ce_words, .fsm_we, .cnt_words);

  task automatic check(input logic [7:0] got, input logic [7:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  task automatic idle();
    we = 0; cmd_we = 0; ce_from = 0; ce_to = 0; ce_words = 0; fsm_we = 0;
    addr_sel = ADDR_CPU; data_sel = DATA_CPU;
  endtask

  task automatic load(input cmd_sel_e which, input logic [5:0] value);
    @(negedge clk); idle(); cmd_we = 1; addr = value; din = {6'h00, which};
    @(negedge clk); idle();
  endtask

  task automatic read_check(input logic [5:0] a);
    @(negedge clk); idle(); addr = a;
    @(negedge clk);
    check(dout, model[a], $sformatf("external read of %0d", a));
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n, from, to;
    idle(); reset = 1; addr = 0; din = 0;
    @(negedge clk); reset = 0;
    check(8'(cnt_words), 8'h00, "WCNT cleared by reset");
    for (int i = 0; i < 64; i++) begin
      @(negedge clk); idle(); we = 1; addr = 6'(i); din = 8'($urandom); model[i] = din;
    end
    for (int i = 0; i < 64; i += 7) read_check(6'(i));
    for (int t = 0; t < 20; t++) begin
      n = 1 + ($urandom % 12); from = $urandom % 64; to = $urandom % 64;
      load(CMD_WCNT, 6'(n)); load(CMD_FROM, 6'(from)); load(CMD_TO, 6'(to));
      check(8'(cnt_words), 8'(n), "WCNT loaded from addr");
      for (int w = 0; w < n; w++) begin
        // Read cycle through FROM.
        idle(); addr_sel = ADDR_FROM; data_sel = DATA_RAM; ce_from = 1; ce_words = 1;
        @(negedge clk);
        check(dout, model[6'(from + w)], "word read through FROM");
        check(8'(cnt_words), 8'(n - w - 1), "WCNT counts down");
        // Write cycle through TO with the RAM output fed back.
        idle(); addr_sel = ADDR_TO; data_sel = DATA_RAM; ce_to = 1; fsm_we = 1;
        model[6'(to + w)] = model[6'(from + w)];
        @(negedge clk);
      end
      idle();
      for (int w = 0; w < n; w++) read_check(6'(to + w));
      // A normal write while counters are loaded must use the CPU address.
      @(negedge clk); idle(); we = 1; addr = 6'($urandom); din = 8'($urandom); model[addr] = din;
      read_check(addr);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
