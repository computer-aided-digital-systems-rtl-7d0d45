// Self-checking testbench of counter.
//
// An up counter and a down counter (6 bit) are driven with random mixes of
// en, sload, sclr, and with aload and aclr pulses between clock edges.
// A reference model follows the priority aclr > aload > sclr > sload > en
// and wraps at the ends; the asynchronous controls must act without a
// clock edge.
module tb_counter;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic       aclr, aload, sclr, sload, en;
  logic [5:0] d, q_up, q_dn, m_up, m_dn;
  counter #(.W(6), .DOWN(1'b0)) u_up (.clk, .aclr, .aload, .sclr, .sload, .en, .d, .q(q_up));
  counter #(.W(6), .DOWN(1'b1)) u_dn (.clk, .aclr, .aload, .sclr, .sload, .en, .d, .q(q_dn));

  task automatic check(input logic [5:0] got, input logic [5:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    aclr = 0; aload = 0; sclr = 1; sload = 0; en = 0; d = 0;
    @(posedge clk); #1;
    m_up = 0; m_dn = 0;
    check(q_up, 0, "sclr up"); check(q_dn, 0, "sclr down");
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      sclr = ($urandom % 20) == 0; sload = ($urandom % 8) == 0;
      en = ($urandom % 4) != 0; d = 6'($urandom);
      if (($urandom % 25) == 0) begin
        // Asynchronous pulse in the low half of the clock.
        if ($urandom % 2) begin
          aclr = 1; #1; m_up = 0; m_dn = 0;
          check(q_up, 0, "aclr up"); check(q_dn, 0, "aclr down");
          aclr = 0;
        end else begin
          aload = 1; #1; m_up = d; m_dn = d;
          check(q_up, d, "aload up"); check(q_dn, d, "aload down");
          aload = 0;
        end
      end
      @(posedge clk);
      if (sclr)       begin m_up = 0;     m_dn = 0;     end
      else if (sload) begin m_up = d;     m_dn = d;     end
      else if (en)    begin m_up += 6'd1; m_dn -= 6'd1; end
      #1 check(q_up, m_up, "up count"); check(q_dn, m_dn, "down count");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
