// End-to-end testbench of datapath_design_top, at its default sizes.
//
// Drives all examples at once from one clock (inputs change on the falling
// edge, except the async-RAM controller, which changes 1 time unit after
// the rising edge like a flip-flop output). Each example is compared with
// its own reference model:
//   - block-transfer RAM: fill, counter loads, transfers of random length
//     (busy must last 2*WCNT clocks), full read-back after each;
//   - mux transfer, bus transfer and three-state bus: random traffic;
//   - counter-addressed async and sync RAMs: fill with the counter
//     advancing every write, then read back;
//   - registered-output RAM: reads with two-edge latency.
// Every mechanism (normal write, normal read, each counter load, transfer,
// R1->R0 and R2->R0 moves, bus move from a register and from outside,
// three-state drive by a register and by the outside driver, gated async
// write, counter-addressed sync write, registered-output read) is counted,
// and one that never happened counts as a failure.
module tb_datapath_design_top;
  import xfer_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  // Block-transfer RAM.
  logic       xt_reset, xt_we, xt_cmd_we, xt_xfer, xt_busy;
  logic [5:0] xt_addr, xt_cnt_words;
  logic [7:0] xt_din, xt_dout;
  logic [1:0] xt_state;
  // Mux transfer.
  logic       mt_rst, mt_ld1, mt_ld2, mt_k1, mt_k2;
  logic [3:0] mt_d1, mt_d2, mt_r0, mt_r1, mt_r2;
  // Bus transfer.
  logic       bt_rst;
  logic [1:0] bt_sel;
  logic [2:0] bt_load;
  logic [7:0] bt_ext, bt_bus, bt_r [3];
  // Three-state bus.
  logic       tb3_rst, tb3_ext_en, tb3_ext_data, tb3_bus;
  logic [2:0] tb3_en, tb3_load;
  // Counter-addressed RAMs.
  logic       car_rst, car_cnt_en, car_we, csr_rst, csr_cnt_en, csr_we;
  logic [3:0] car_din, car_addr, car_dout, csr_din, csr_addr, csr_dout;
  // Registered-output RAM.
  logic       sro_we;
  logic [3:0] sro_addr, sro_din, sro_q;

  datapath_design_top dut (
    .clk,
    .xt_reset, .xt_we, .xt_cmd_we, .xt_addr, .xt_din, .xt_xfer, .xt_dout, .xt_busy,
    .xt_state, .xt_cnt_words,
    .mt_rst, .mt_ld1, .mt_d1, .mt_ld2, .mt_d2, .mt_k1, .mt_k2, .mt_r0, .mt_r1, .mt_r2,
    .bt_rst, .bt_sel, .bt_load, .bt_ext, .bt_bus, .bt_r,
    .tb3_rst, .tb3_en, .tb3_load, .tb3_ext_en, .tb3_ext_data, .tb3_bus,
    .car_rst, .car_cnt_en, .car_we, .car_din, .car_addr, .car_dout,
    .csr_rst, .csr_cnt_en, .csr_we, .csr_din, .csr_addr, .csr_dout,
    .sro_outclock(clk), .sro_we, .sro_addr, .sro_din, .sro_q
  );

  // Mechanism counters.
  typedef enum int {
    M_XT_WRITE, M_XT_READ, M_XT_LD_WCNT, M_XT_LD_FROM, M_XT_LD_TO, M_XT_TRANSFER,
    M_MT_K1, M_MT_K2, M_BT_FROM_REG, M_BT_FROM_EXT, M_TB3_REG_DRIVE, M_TB3_EXT_DRIVE,
    M_CAR_GATED_WRITE, M_CSR_WRITE, M_SRO_READ, M_COUNT
  } mech_e;
  int mech [M_COUNT];

  task automatic check(input logic [7:0] got, input logic [7:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------------------------------------------------------- block transfer
  logic [7:0] xt_model [64];
  bit         xt_done = 0;

  task automatic xt_load(input cmd_sel_e which, input logic [5:0] value);
    @(negedge clk); xt_we = 0; xt_cmd_we = 1; xt_addr = value; xt_din = {6'h00, which};
    unique case (which)
      CMD_WCNT: mech[M_XT_LD_WCNT]++;
      CMD_FROM: mech[M_XT_LD_FROM]++;
      default:  mech[M_XT_LD_TO]++;
    endcase
    @(negedge clk); xt_cmd_we = 0;
  endtask

  task automatic xt_read_all();
    for (int i = 0; i < 64; i++) begin
      @(negedge clk); xt_we = 0; xt_addr = 6'(i);
      @(negedge clk);
      check(xt_dout, xt_model[i], $sformatf("xfer RAM word %0d", i));
      mech[M_XT_READ]++;
    end
  endtask

  initial begin
    int n, from, to, cycles;
    xt_reset = 1; xt_we = 0; xt_cmd_we = 0; xt_xfer = 0; xt_addr = 0; xt_din = 0;
    @(negedge clk); @(negedge clk); xt_reset = 0;
    for (int i = 0; i < 64; i++) begin
      @(negedge clk); xt_we = 1; xt_addr = 6'(i); xt_din = 8'($urandom); xt_model[i] = xt_din;
      mech[M_XT_WRITE]++;
    end
    @(negedge clk); xt_we = 0;
    xt_read_all();
    for (int t = 0; t < 8; t++) begin
      n = 1 + ($urandom % 63); from = $urandom % 64; to = $urandom % 64;
      xt_load(CMD_WCNT, 6'(n)); xt_load(CMD_FROM, 6'(from)); xt_load(CMD_TO, 6'(to));
      for (int w = 0; w < n; w++) xt_model[6'(to + w)] = xt_model[6'(from + w)];
      @(negedge clk); xt_xfer = 1;
      @(negedge clk); xt_xfer = 0;
      cycles = 0;
      while (xt_busy && cycles < 1000) begin cycles++; @(negedge clk); end
      check(8'(cycles), 8'(2 * n), "transfer time 2*WCNT");
      mech[M_XT_TRANSFER]++;
      xt_read_all();
    end
    xt_done = 1;
  end

  // ---------------------------------------------------------------- mux / bus / tri
  bit         small_done = 0;
  logic [3:0] mm0, mm1, mm2;
  logic [7:0] bm [3], bbus;
  logic       tm [3], tbus;

  initial begin
    int src;
    mt_rst = 1; mt_ld1 = 0; mt_ld2 = 0; mt_k1 = 0; mt_k2 = 0; mt_d1 = 0; mt_d2 = 0;
    bt_rst = 1; bt_sel = 0; bt_load = 0; bt_ext = 0;
    tb3_rst = 1; tb3_en = 0; tb3_load = 0; tb3_ext_en = 1; tb3_ext_data = 0;
    @(negedge clk);
    mt_rst = 0; bt_rst = 0; tb3_rst = 0;
    mm0 = 0; mm1 = 0; mm2 = 0; bm = '{8'h0, 8'h0, 8'h0}; tm = '{1'b0, 1'b0, 1'b0};
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      mt_ld1 = 1'($urandom % 2); mt_ld2 = 1'($urandom % 2); mt_d1 = 4'($urandom); mt_d2 = 4'($urandom);
      mt_k1 = ($urandom % 3) == 0; mt_k2 = ($urandom % 3) == 0;
      bt_sel = 2'($urandom); bt_load = 3'($urandom); bt_ext = 8'($urandom);
      bbus = (bt_sel == 2'd3) ? bt_ext : bm[bt_sel];
      src = (n < 5) ? 3 : $urandom % 4;
      tb3_en = 3'b000; tb3_ext_en = 0;
      if (src == 3) tb3_ext_en = 1; else tb3_en[src] = 1'b1;
      tb3_ext_data = 1'($urandom); tb3_load = 3'($urandom);
      tbus = (src == 3) ? tb3_ext_data : tm[src];
      #1;
      check(bt_bus, bbus, "bus transfer: bus");
      check(8'(tb3_bus), 8'(tbus), "three-state bus value");
      if (bt_load != 0) mech[(bt_sel == 2'd3) ? M_BT_FROM_EXT : M_BT_FROM_REG]++;
      mech[(src == 3) ? M_TB3_EXT_DRIVE : M_TB3_REG_DRIVE]++;
      @(posedge clk);
      if (mt_k1)      begin mm0 = mm1; mech[M_MT_K1]++; end
      else if (mt_k2) begin mm0 = mm2; mech[M_MT_K2]++; end
      if (mt_ld1) mm1 = mt_d1;
      if (mt_ld2) mm2 = mt_d2;
      for (int i = 0; i < 3; i++) if (bt_load[i]) bm[i] = bbus;
      for (int i = 0; i < 3; i++) if (tb3_load[i]) tm[i] = tbus;
      #1;
      check(8'(mt_r0), 8'(mm0), "mux transfer R0");
      check(8'(mt_r1), 8'(mm1), "mux transfer R1");
      check(8'(mt_r2), 8'(mm2), "mux transfer R2");
      for (int i = 0; i < 3; i++) check(bt_r[i], bm[i], "bus transfer register");
    end
    small_done = 1;
  end

  // ---------------------------------------------------------------- RAM examples
  bit         car_done = 0, csr_done = 0, sro_done = 0;
  logic [3:0] car_model [16], csr_model [16], sro_model [16];

  initial begin
    car_rst = 1; car_cnt_en = 0; car_we = 0; car_din = 0;
    @(posedge clk); #1 car_rst = 0;
    for (int pass = 0; pass < 10; pass++) begin
      for (int i = 0; i < 16; i++) begin
        car_we = 1; car_cnt_en = 1; car_din = 4'($urandom); car_model[car_addr] = car_din;
        mech[M_CAR_GATED_WRITE]++;
        @(posedge clk); #1;
      end
      car_we = 0;
      for (int i = 0; i < 16; i++) begin
        check(8'(car_dout), 8'(car_model[car_addr]), "async RAM word");
        @(posedge clk); #1;
      end
      car_cnt_en = 0;
    end
    car_done = 1;
  end

  initial begin
    logic [3:0] prev;
    csr_rst = 1; csr_cnt_en = 0; csr_we = 0; csr_din = 0;
    @(negedge clk); csr_rst = 0;
    for (int pass = 0; pass < 10; pass++) begin
      for (int i = 0; i < 16; i++) begin
        @(negedge clk);
        csr_we = 1; csr_cnt_en = 1; csr_din = 4'($urandom); csr_model[csr_addr] = csr_din;
        mech[M_CSR_WRITE]++;
      end
      @(negedge clk); csr_we = 0;
      for (int i = 0; i < 16; i++) begin
        prev = csr_addr;
        @(negedge clk);
        check(8'(csr_dout), 8'(csr_model[prev]), "sync RAM word, one clock after its address");
      end
      csr_cnt_en = 0;
    end
    csr_done = 1;
  end

  initial begin
    logic [3:0] a_prev;
    sro_we = 0; sro_addr = 0; sro_din = 0;
    for (int i = 0; i < 16; i++) begin
      @(negedge clk); sro_we = 1; sro_addr = 4'(i); sro_din = 4'($urandom); sro_model[i] = sro_din;
    end
    @(negedge clk); sro_we = 0; sro_addr = 4'($urandom);
    for (int n = 0; n < 500; n++) begin
      a_prev = sro_addr;
      @(negedge clk); sro_addr = 4'($urandom);
      @(posedge clk); #1;
      check(8'(sro_q), 8'(sro_model[a_prev]), "registered-output RAM, two edges");
      mech[M_SRO_READ]++;
    end
    sro_done = 1;
  end

  // ---------------------------------------------------------------- report
  initial begin
    wait (xt_done && small_done && car_done && csr_done && sro_done);
    for (int m = 0; m < M_COUNT; m++) begin
      $display("mechanism %s happened %0d times", mech_e'(m), mech[m]);
      checks++;
      if (mech[m] == 0) begin
        failures++;
        $display("FAIL mechanism %s never happened", mech_e'(m));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
