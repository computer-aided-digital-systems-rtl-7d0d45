// Self-checking testbench of async_ram (16 x 4, no clock).
//
// Writes the notes' example contents with short we pulses while address
// and data are held, then reads addresses F, 0, 1, 2, 3, 4 and checks that
// dout follows the address with no clock. Then random writes and reads
// against a reference array; every write must change only the addressed
// word.
module tb_async_ram;
  int checks = 0, failures = 0;

  logic       we;
  logic [3:0] a, d, q;
  async_ram dut (.we, .addr(a), .din(d), .dout(q));

  logic [3:0] model [16];
  logic [3:0] pat_a [6] = '{4'hF, 4'h0, 4'h1, 4'h2, 4'h3, 4'h4};
  logic [3:0] pat_d [6] = '{4'h3, 4'h5, 4'hA, 4'hD, 4'h8, 4'hB};

  task automatic check(input logic [3:0] got, input logic [3:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  task automatic write(input logic [3:0] addr, input logic [3:0] data);
    we = 0; a = addr; d = data; #2;
    we = 1; #3;
    we = 0; #2;
    model[addr] = data;
  endtask

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; a = 0; d = 0;
    for (int i = 0; i < 16; i++) write(4'(i), 4'(i ^ 4'h6));
    for (int i = 0; i < 6; i++) write(pat_a[i], pat_d[i]);
    for (int i = 0; i < 6; i++) begin
      a = pat_a[i]; #1;
      check(q, pat_d[i], "read of example contents");
    end
    for (int n = 0; n < 500; n++) begin
      if ($urandom % 2) write(4'($urandom), 4'($urandom));
      for (int i = 0; i < 16; i++) begin
        a = 4'(i); #1;
        check(q, model[i], "read after random write");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
