// End-to-end testbench of the test circuit, all parameters at their defaults.
//
// The circuit runs with behavioural models of the AVR core and the Ethernet
// MAC.  After reset the PROM program configures the MAC through the port A/B
// protocol (register writes and one read-back).  Then frames are delivered:
//   1. the example test program (clear r18, count it up 15 times while
//      copying it to port B, check it, report on port A bit 5, end with
//      port A bit 6) -- expected to pass;
//   2. the same program with a wrong expected count -- expected to report a
//      failure;
//   3. a frame for another station address -- expected to be discarded by
//      the MAC and start no test;
//   4. the passing program again, to show the circuit re-arms.
// Checked: MAC register contents after start-up, the port-B count sequence,
// the status and end bits, that the first test word is fetched from RAM in
// the same cycle as its address (no added delay), the test's cycle count, the
// return to the PROM, the MAC re-armed by the PROM afterwards, and that each
// mechanism happened at least once.
module tb_avr_test_top;
  import avr_test_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [15:0] core_pc, core_inst;
  logic [7:0]  porta, portb, pinb, pind;
  logic        portb_we, mac_int, test_active, prom_cs, ram_sel;
  wb_req_t     mac_req, dma_req;
  wb_rsp_t     mac_rsp, dma_rsp;
  int          n_exec, n_illegal, n_irq;

  avr_test_top dut (
    .clk, .rst_n, .core_pc, .core_inst, .porta, .portb, .portb_we, .pinb, .pind,
    .mac_req, .mac_rsp, .dma_req, .dma_rsp, .mac_int, .test_active, .prom_cs, .ram_sel
  );

  avr_core_model cpu (
    .clk, .rst_n, .pc(core_pc), .inst(core_inst), .porta, .portb, .portb_we,
    .pinb, .pind, .inject_fault(1'b0), .n_exec, .n_illegal, .n_irq
  );

  eth_mac_model mac (
    .clk, .rst_n, .reg_req(mac_req), .reg_rsp(mac_rsp), .dma_req, .dma_rsp, .int_o(mac_int)
  );

  int checks = 0, failures = 0;
  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s (t=%0t)", what, $time);
    end
  endtask

  // ---------------------------------------------------------------- watchdog
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------------------------------------------------------- monitors
  int n_ram_fetch, n_prom_after_test, n_test_start, n_test_end, n_zero_delay_ok;
  logic [7:0] portb_log [$];
  logic       ta_q;
  always @(posedge clk) begin
    ta_q <= test_active;
    if (ram_sel) n_ram_fetch++;
    if (test_active && portb_we) portb_log.push_back(portb);
    if (test_active && !ta_q) n_test_start++;
    if (!test_active && ta_q) n_test_end++;
    // first test word: address 0008h from RAM, in the same cycle
    if (ram_sel && core_pc == 16'h0008) begin
      checks++;
      if (core_inst != 16'hEF3F) begin
        failures++;
        $display("FAIL: word at 0008h is %h", core_inst);
      end else n_zero_delay_ok++;
    end
  end

  // ---------------------------------------------------------------- frames
  // The example test program (word address 0008h onward), as assembled AVR
  // code, and two more words that set status and end together.
  localparam int unsigned PROG_WORDS = 20;
  localparam logic [15:0] PROG [PROG_WORDS] = '{
    16'hEF3F, 16'hBB3A, 16'hBB37, 16'hE04F, 16'hE020, 16'h3040, 16'hF029, 16'hBB28,
    16'h954A, 16'h9523, 16'h940C, 16'h000D, 16'h302F, 16'hF011, 16'hE430, 16'hBB3B,
    16'hE230, 16'hBB3B, 16'hE630, 16'hBB3B
  };

  function automatic void make_frame(output logic [7:0] f [], input logic [47:0] dst,
                                     input logic [7:0] expect_count);
    logic [15:0] w;
    f = new[14 + 2*PROG_WORDS + 1];
    for (int i = 0; i < 6; i++) f[i] = dst[47-8*i -: 8];
    {f[6], f[7], f[8], f[9], f[10], f[11]} = 48'h0015_F21E_6ADC;
    {f[12], f[13]} = 16'(2*PROG_WORDS + 1);
    for (int i = 0; i < int'(PROG_WORDS); i++) begin
      w = PROG[i];
      if (i == 12) w = {w[15:12], expect_count[7:4], w[7:4], expect_count[3:0]};  // cpi r18
      {f[14 + 2*i], f[15 + 2*i]} = w;
    end
    f[14 + 2*PROG_WORDS] = 8'h00;
  endfunction

  task automatic wait_idle();   // PROM program sitting in its wait loop
    int same;
    logic [15:0] last;
    same = 0;
    last = core_pc;
    while (same < 4) begin
      @(posedge clk);
      if (core_pc == last && !test_active && prom_cs) same++;
      else same = 0;
      last = core_pc;
    end
  endtask

  // run one frame; returns port A at the end of the test and the cycles the
  // test took from the interrupt to "program end"
  task automatic run_test(input logic [7:0] f [], output logic [7:0] pa_end, output int cycles);
    bit ok;
    mac.receive(f, ok);
    check(ok, "MAC accepts test frame");
    cycles = 0;
    while (!test_active) @(posedge clk);
    while (!porta[PA_END]) begin
      @(posedge clk);
      cycles++;
    end
    pa_end = porta;
    @(posedge clk);
    check(!ram_sel && prom_cs, "PROM selected once the program ends");
    if (!ram_sel && prom_cs) n_prom_after_test++;
    wait_idle();
  endtask

  logic [7:0] f [];
  logic [7:0] pa;
  int         cyc;
  int         n_pass, n_fail, n_drop;
  bit         ok;

  initial begin
    n_pass = 0; n_fail = 0; n_drop = 0;
    repeat (4) @(posedge clk);
    rst_n = 1'b1;

    // ---- start-up configuration through the control port
    wait_idle();
    check(mac.moder == MODER_CFG,          "MODER configured");
    check(mac.packetlen == PACKETLEN_CFG,  "PACKETLEN configured");
    check(mac.addr0 == 32'h203E_ABCD && mac.addr1 == 32'h0000_0013, "station address configured");
    check(mac.int_mask == 32'h4,           "receive interrupt unmasked");
    check(mac.bd_ctrl[15:13] == 3'b111,    "receive descriptor armed");
    check(mac.n_reg_wr == 7,               "seven start-up register writes");
    check(mac.n_reg_rd == 1,               "one start-up register read");
    check(core_pc >= 16'h0200,             "start-up code runs above 0200h");
    check(n_irq == 0 && !test_active,      "no test before a frame");

    // ---- 1: passing test
    portb_log.delete();
    make_frame(f, 48'h0013_203E_ABCD, 8'h0F);
    run_test(f, pa, cyc);
    check(pa[PA_STATUS] == 1'b1, "test 1 reports success on port A bit 5");
    check(portb_log.size() == 15, "test 1 writes port B 15 times");
    for (int i = 0; i < portb_log.size() && i < 15; i++)
      check(portb_log[i] == 8'(i), $sformatf("port B count value %0d", i));
    if (pa[PA_STATUS]) n_pass++;
    // loop: 15 iterations of 7 cycles (cpi, breq, out, dec, inc, jmp x2),
    // plus 5 set-up words, the exit (cpi, taken breq), the check (cpi, taken
    // breq) and the two port A writes of the success path (4 words)
    check(cyc == 5 + 15*7 + 2 + 2 + 4 - 1 + 2, $sformatf("test 1 cycle count %0d", cyc));
    check(mac.int_source[2] == 1'b0 && mac.bd_ctrl[15] == 1'b1, "PROM re-armed the MAC");
    check(porta[PA_END] == 1'b0 && porta[PA_STATUS] == 1'b1, "end bit dropped, status kept");

    // ---- 2: failing test (expects 14)
    portb_log.delete();
    make_frame(f, 48'h0013_203E_ABCD, 8'h0E);
    run_test(f, pa, cyc);
    check(pa[PA_STATUS] == 1'b0, "test 2 reports failure on port A bit 5");
    if (!pa[PA_STATUS]) n_fail++;

    // ---- 3: frame for another station is discarded
    make_frame(f, 48'h0013_203E_ABCE, 8'h0F);
    mac.receive(f, ok);
    check(!ok, "frame for another station discarded");
    repeat (50) @(posedge clk);
    check(!test_active && n_test_start == 2, "discarded frame starts no test");
    if (!ok) n_drop++;

    // ---- 4: the circuit re-arms
    make_frame(f, 48'h0013_203E_ABCD, 8'h0F);
    run_test(f, pa, cyc);
    check(pa[PA_STATUS] == 1'b1, "test 4 reports success");
    if (pa[PA_STATUS]) n_pass++;

    // ---- mechanisms
    check(mac.n_reg_wr > 0,         "mechanism: register write through the control port");
    check(mac.n_reg_rd > 0,         "mechanism: register read through the control port");
    check(mac.n_rx_ok == 3,         "mechanism: frame stored in RAM");
    check(n_irq == 3,               "mechanism: interrupt to 0008h");
    check(n_ram_fetch > 0,          "mechanism: fetch from RAM");
    check(n_zero_delay_ok == 3,     "mechanism: RAM word available in the address cycle");
    check(n_prom_after_test == 3,   "mechanism: return to PROM on program end");
    check(n_pass == 2,              "mechanism: success reported");
    check(n_fail == 1,              "mechanism: failure reported");
    check(n_drop == 1,              "mechanism: frame discarded by the MAC");
    check(n_illegal == 0,           "no instruction outside the modelled subset");
    $display("mechanisms: reg_wr=%0d reg_rd=%0d frames=%0d irq=%0d ram_fetch=%0d prom_return=%0d pass=%0d fail=%0d drop=%0d",
             mac.n_reg_wr, mac.n_reg_rd, mac.n_rx_ok, n_irq, n_ram_fetch, n_prom_after_test,
             n_pass, n_fail, n_drop);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
