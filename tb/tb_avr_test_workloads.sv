// Workload testbench: long test runs and fault detection, with the circuit
// at its default sizes and behavioural models of the core and the MAC.
//
//   1. A long-running test program: three nested countdown loops (80 x 250 x
//      125) that count the outer iterations in r24 and report success when
//      r24 reaches 80.  It runs a little over five million clock cycles from
//      RAM.  The cycle count from test start to "program end" is compared
//      with the count worked out from the loop structure.
//   2. Fault detection: the short counting test (count r18 to 15 while copying
//      it to port B, then check it) is run on a correct core and then on a core
//      whose inc instruction loses the carry from bit 2 into bit 3.  The first
//      must report success on port A bit 5 and the second failure.
module tb_avr_test_workloads;
  import avr_test_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [15:0] core_pc, core_inst;
  logic [7:0]  porta, portb, pinb, pind;
  logic        portb_we, mac_int, test_active, prom_cs, ram_sel, inject_fault;
  wb_req_t     mac_req, dma_req;
  wb_rsp_t     mac_rsp, dma_rsp;
  int          n_exec, n_illegal, n_irq;

  avr_test_top dut (
    .clk, .rst_n, .core_pc, .core_inst, .porta, .portb, .portb_we, .pinb, .pind,
    .mac_req, .mac_rsp, .dma_req, .dma_rsp, .mac_int, .test_active, .prom_cs, .ram_sel
  );

  avr_core_model cpu (
    .clk, .rst_n, .pc(core_pc), .inst(core_inst), .porta, .portb, .portb_we,
    .pinb, .pind, .inject_fault, .n_exec, .n_illegal, .n_irq
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

  initial begin
    repeat (6_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Frame to the station address, with the given program words as payload.
  function automatic void make_frame(output logic [7:0] f [], input logic [15:0] prog [$]);
    f = new[14 + 2*prog.size()];
    {f[0], f[1], f[2], f[3], f[4], f[5]}    = 48'h0013_203E_ABCD;
    {f[6], f[7], f[8], f[9], f[10], f[11]}  = 48'h0015_F21E_6ADC;
    {f[12], f[13]} = 16'(2*prog.size());
    foreach (prog[i]) {f[14 + 2*i], f[15 + 2*i]} = prog[i];
  endfunction

  task automatic wait_idle();
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

  task automatic run_test(input logic [7:0] f [], output logic [7:0] pa_end, output longint cycles);
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
    wait_idle();
  endtask

  localparam int OUTER = 80, MID = 250, INNER = 125;

  initial begin
    logic [15:0] prog [$];
    logic [7:0]  f [];
    logic [7:0]  pa;
    longint      cyc, expect_cyc;

    inject_fault = 1'b0;
    repeat (4) @(posedge clk);
    rst_n = 1'b1;
    wait_idle();

    // ---- 1: long run.  Word addresses from 0008h.
    prog = {};
    prog.push_back(enc_ldi(16, 8'hFF));           // 08 ldi r16, FFh
    prog.push_back(enc_out(IO_DDRA, 16));         // 09 out DDRA, r16
    prog.push_back(enc_ldi(20, 8'(OUTER)));       // 0A ldi r20, OUTER
    prog.push_back(enc_ldi(24, 8'h00));           // 0B ldi r24, 0
    prog.push_back(enc_ldi(22, 8'(MID)));         // 0C L1: ldi r22, MID
    prog.push_back(enc_ldi(23, 8'(INNER)));       // 0D L2: ldi r23, INNER
    prog.push_back(16'h957A);                     // 0E L3: dec r23
    prog.push_back(enc_brz(1'b0, 'h0F, 'h0E));    // 0F brne L3
    prog.push_back(16'h956A);                     // 10 dec r22
    prog.push_back(enc_brz(1'b0, 'h11, 'h0D));    // 11 brne L2
    prog.push_back(16'h9583);                     // 12 inc r24
    prog.push_back(16'h954A);                     // 13 dec r20
    prog.push_back(enc_brz(1'b0, 'h14, 'h0C));    // 14 brne L1
    prog.push_back(enc_cpi(24, 8'(OUTER)));       // 15 cpi r24, OUTER
    prog.push_back(enc_brz(1'b0, 'h16, 'h19));    // 16 brne fail
    prog.push_back(enc_ldi(19, 8'h60));           // 17 ldi r19, 60h
    prog.push_back(enc_out(IO_PORTA, 19));        // 18 out PORTA, r19
    prog.push_back(enc_ldi(19, 8'h40));           // 19 fail: ldi r19, 40h
    prog.push_back(enc_out(IO_PORTA, 19));        // 1A out PORTA, r19
    make_frame(f, prog);
    run_test(f, pa, cyc);
    // one cycle for the interrupt, then one cycle per instruction word
    expect_cyc = 1 + 4 + longint'(OUTER) * (1 + longint'(MID) * (1 + 2*INNER + 2) + 3) + 4;
    $display("long run: %0d cycles (%0.3f ms at 50 MHz)", cyc, real'(cyc) / 50.0e3);
    check(cyc == expect_cyc, $sformatf("long run takes %0d cycles (expected %0d)", cyc, expect_cyc));
    check(cyc >= 5_000_000, "long run is at least five million cycles");
    check(pa[PA_STATUS], "long run reports success");

    // ---- 2: fault detection with the counting test
    prog = {16'hEF3F, 16'hBB3A, 16'hBB37, 16'hE04F, 16'hE020, 16'h3040, 16'hF029, 16'hBB28,
            16'h954A, 16'h9523, 16'h940C, 16'h000D, 16'h302F, 16'hF011, 16'hE430, 16'hBB3B,
            16'hE230, 16'hBB3B, 16'hE630, 16'hBB3B};
    make_frame(f, prog);
    run_test(f, pa, cyc);
    check(pa[PA_STATUS] == 1'b1, "correct core passes the counting test");
    inject_fault = 1'b1;
    run_test(f, pa, cyc);
    check(pa[PA_STATUS] == 1'b0, "core with a faulty inc fails the counting test");
    check(porta[PA_STATUS] == 1'b0, "failure stays visible on port A bit 5");
    inject_fault = 1'b0;
    run_test(f, pa, cyc);
    check(pa[PA_STATUS] == 1'b1, "repaired core passes again");
    check(n_irq == 4 && n_illegal == 0, "four tests started, no unknown instruction");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
