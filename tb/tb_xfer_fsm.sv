// Self-checking testbench of xfer_fsm.
//
// A behavioural word counter (loaded with N, decremented by ce_words) feeds
// cnt_words back to the controller. For transfers of random length the
// testbench checks every cycle against the expected state sequence
// S0 -> (S1, S2) x N -> S0 and the outputs of each state, and that busy
// lasts exactly 2N clocks. It also checks that xfer is ignored while busy
// and that reset returns to S0.
module tb_xfer_fsm;
  import xfer_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic        reset, xfer, busy, ce_from, ce_to, ce_words, fsm_we;
  logic [5:0]  cnt;
  addr_sel_e   addr_sel;
  data_sel_e   data_sel;
  xfer_state_e state;

  xfer_fsm dut (.clk, .reset, .xfer, .cnt_words(cnt), .busy, .addr_sel, .data_sel,
                .ce_from, .ce_to, .ce_words, .fsm_we, .state);

  always_ff @(posedge clk) if (ce_words) cnt <= cnt - 6'd1;

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s (state %s)", what, state.name());
    end
  endtask

  task automatic check_state(input xfer_state_e s);
    check(state == s, $sformatf("expected state %s", s.name()));
    unique case (s)
      S0_IDLE:  check(!busy && addr_sel == ADDR_CPU && data_sel == DATA_CPU &&
                      !ce_from && !ce_to && !ce_words && !fsm_we, "S0 outputs");
      S1_READ:  check(busy && addr_sel == ADDR_FROM && data_sel == DATA_RAM &&
                      ce_from && !ce_to && ce_words && !fsm_we, "S1 outputs");
      S2_WRITE: check(busy && addr_sel == ADDR_TO && data_sel == DATA_RAM &&
                      !ce_from && ce_to && !ce_words && fsm_we, "S2 outputs");
      default:  check(1'b0, "illegal state");
    endcase
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n, busy_cycles;
    reset = 1; xfer = 0;
    @(negedge clk); @(negedge clk);
    reset = 0;
    check_state(S0_IDLE);
    for (int t = 0; t < 40; t++) begin
      n = 1 + ($urandom % 20);
      if (t == 0) n = 1;
      cnt = 6'(n);
      // Idle cycles with xfer low keep S0.
      repeat (2) begin @(negedge clk); check_state(S0_IDLE); end
      xfer = 1;
      @(negedge clk);
      xfer = ($urandom % 2);   // xfer held or dropped: must not matter
      busy_cycles = 0;
      for (int w = 0; w < n; w++) begin
        check_state(S1_READ);  busy_cycles += int'(busy);
        @(negedge clk);
        check_state(S2_WRITE); busy_cycles += int'(busy);
        @(negedge clk);
      end
      xfer = 0;
      check_state(S0_IDLE);
      check(busy_cycles == 2 * n, $sformatf("busy for %0d cycles, expected %0d", busy_cycles, 2 * n));
    end
    // Reset in the middle of a transfer.
    cnt = 6'd10; xfer = 1;
    @(negedge clk); xfer = 0;
    @(negedge clk); @(negedge clk);
    reset = 1;
    @(negedge clk); reset = 0;
    check_state(S0_IDLE);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
