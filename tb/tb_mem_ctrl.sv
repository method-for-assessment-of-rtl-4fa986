// Testbench of the memory control: drives program-counter values across the
// RAM/PROM boundary (0000h, 0007h, 0008h, 01FFh, 0200h, FFFFh and random
// values) with every combination of test_active and port A bit 6, and checks
// the instruction source and PROM chip select against the address map:
// RAM only while a test runs, bit 6 is low and the PC is below 0200h.  The
// outputs are checked 1 time unit after the inputs change, i.e. with no
// clock in between (no added fetch delay).
module tb_mem_ctrl;
  logic [15:0] core_pc, prom_data, ram_data, core_inst;
  logic        test_active, prog_end, prom_cs, ram_sel;
  int          checks = 0, failures = 0;

  mem_ctrl #(.RAM_DEPTH(512)) dut (
    .core_pc, .test_active, .prog_end, .prom_data, .ram_data, .prom_cs, .ram_sel, .core_inst
  );

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic try(input logic [15:0] pc, input logic ta, input logic pe);
    logic expect_ram;
    core_pc = pc; test_active = ta; prog_end = pe;
    prom_data = 16'($urandom); ram_data = 16'($urandom);
    if (ram_data == prom_data) ram_data = ~prom_data;
    #1;
    expect_ram = ta && !pe && (pc <= 16'h01FF);
    checks++;
    if (ram_sel !== expect_ram || prom_cs !== !expect_ram ||
        core_inst !== (expect_ram ? ram_data : prom_data)) begin
      failures++;
      $display("FAIL: pc=%h ta=%b end=%b ram_sel=%b cs=%b inst=%h", pc, ta, pe, ram_sel, prom_cs, core_inst);
    end
  endtask

  initial begin
    logic [15:0] edges [6] = '{16'h0000, 16'h0007, 16'h0008, 16'h01FF, 16'h0200, 16'hFFFF};
    foreach (edges[i])
      for (int c = 0; c < 4; c++) try(edges[i], c[0], c[1]);
    for (int n = 0; n < 2000; n++) try(16'($urandom_range(16'h03FF)), 1'($urandom), 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
