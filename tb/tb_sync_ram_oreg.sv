// Self-checking testbench of sync_ram_oreg (16 x 4, both clocks tied).
//
// Writes the notes' timing example ($F=3, $0=5, $1=$A, $2=$D, $3=$8, $4=$B),
// then applies addresses F, 0, 1, 2, 3, 4 one per clock and checks that each
// word reaches q two edges after its address, not earlier. Then random
// traffic against a reference array, with the same two-edge latency.
module tb_sync_ram_oreg;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic       we;
  logic [3:0] a, d, q;
  sync_ram_oreg dut (.inclock(clk), .outclock(clk), .we, .addr(a), .din(d), .q);

  logic [3:0] model [16];
  logic [3:0] pat_a [6] = '{4'hF, 4'h0, 4'h1, 4'h2, 4'h3, 4'h4};
  logic [3:0] pat_d [6] = '{4'h3, 4'h5, 4'hA, 4'hD, 4'h8, 4'hB};
  logic [3:0] exp_pipe [2];

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
    we = 0; a = 0; d = 0;
    for (int i = 0; i < 6; i++) begin
      @(negedge clk); we = 1; a = pat_a[i]; d = pat_d[i]; model[a] = d;
    end
    @(negedge clk); we = 0;
    // Address i is applied before edge i; its word is on q after edge i+1.
    for (int i = 0; i < 7; i++) begin
      if (i < 6) a = pat_a[i];
      @(posedge clk); #1;
      if (i >= 1) check(q, pat_d[i-1], "q two edges after address");
      @(negedge clk);
      if (i >= 1 && i < 7) check(q, pat_d[i-1], "q holds until the next edge");
    end
    // Random traffic.
    for (int i = 0; i < 16; i++) begin
      @(negedge clk); we = 1; a = 4'(i); d = 4'($urandom); model[i] = d;
    end
    @(negedge clk); we = 0;
    for (int n = 0; n < 1000; n++) begin
      we = ($urandom % 3) == 0; a = 4'($urandom); d = 4'($urandom);
      @(posedge clk);
      exp_pipe[1] = exp_pipe[0];
      if (we) model[a] = d;
      exp_pipe[0] = model[a];
      #1 if (n >= 1) check(q, exp_pipe[1], "random read, two-edge latency");
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
