// Self-checking testbench of sync_ram.
//
// Part 1 runs a 16 x 4 instance through the notes' timing example: the
// words $F=3, $0=5, $1=$A, $2=$D, $3=$8, $4=$B are written, then addresses
// F, 0, 1, 2, 3, 4 are applied one per clock and each word must appear on
// dout exactly one edge after its address. Part 2 runs the default 64 x 8
// instance through random writes and reads against a reference array.
// Inputs change on the falling edge.
module tb_sync_ram;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  // 16 x 4 instance.
  logic       we4;
  logic [3:0] a4, d4, q4;
  sync_ram #(.AW(4), .DW(4)) dut4 (.clk, .we(we4), .addr(a4), .din(d4), .dout(q4));

  // Default 64 x 8 instance.
  logic       we8;
  logic [5:0] a8;
  logic [7:0] d8, q8;
  sync_ram dut8 (.clk, .we(we8), .addr(a8), .din(d8), .dout(q8));

  logic [7:0] model [64];
  logic [3:0] pat_a [6] = '{4'hF, 4'h0, 4'h1, 4'h2, 4'h3, 4'h4};
  logic [3:0] pat_d [6] = '{4'h3, 4'h5, 4'hA, 4'hD, 4'h8, 4'hB};

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
    we4 = 0; a4 = 0; d4 = 0; we8 = 0; a8 = 0; d8 = 0;
    // Part 1: load the timing example.
    for (int i = 0; i < 6; i++) begin
      @(negedge clk); we4 = 1; a4 = pat_a[i]; d4 = pat_d[i];
    end
    @(negedge clk); we4 = 0;
    for (int i = 0; i < 6; i++) begin
      @(negedge clk); a4 = pat_a[i];
      // Before the edge dout still shows the previously latched address.
      if (i > 0) check(8'(q4), 8'(pat_d[i-1]), "dout before edge (one-cycle latency)");
      @(posedge clk); #1;
      check(8'(q4), 8'(pat_d[i]), "dout after edge");
    end

    // Part 2: random traffic on the 64 x 8 RAM.
    for (int i = 0; i < 64; i++) begin
      @(negedge clk); we8 = 1; a8 = 6'(i); d8 = 8'($urandom); model[i] = d8;
    end
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      we8 = ($urandom % 3) == 0; a8 = 6'($urandom); d8 = 8'($urandom);
      @(posedge clk);
      if (we8) model[a8] = d8;
      #1 check(q8, model[a8], "random read");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
