// Testbench of the control and interface block (CIB).
//
// The testbench plays the core (port A, port B with its write strobe), a MAC
// register slave with a random 0-3 cycle acknowledge delay, and the MAC's
// frame-store master.  A shadow of the RAM is built from the CIB's RAM
// write port.  Checked:
//   * register writes: address and data assembled from 4+4 port-B bytes,
//     most significant first, one bus cycle with we=1;
//   * register reads: the bus word appears on the port-B pins byte by byte,
//     each port-B write stepping to the next;
//   * stop in the middle of a sequence aborts it without a bus cycle;
//   * frame storage: header halfwords at RAM words 0-6, payload from word 8,
//     the byte count in word 7, each frame word taking three cycles;
//   * test start on the MAC interrupt: test_active and port D = FFh four
//     cycles after the interrupt rises; held off while port A bit 6 is high;
//   * test end on port A bit 6, in the next cycle.
module tb_cib;
  import avr_test_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [7:0] porta, portb, pinb, pind;
  logic       portb_we, mac_int, ram_we, test_active;
  logic [8:0] ram_waddr;
  logic [15:0] ram_wdata;
  wb_req_t    mac_req, dma_req;
  wb_rsp_t    mac_rsp, dma_rsp;

  cib dut (
    .clk, .rst_n, .porta, .portb, .portb_we, .pinb, .pind,
    .mac_req, .mac_rsp, .dma_req, .dma_rsp, .mac_int,
    .ram_we, .ram_waddr, .ram_wdata, .test_active
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
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------------------------------------------------------- MAC slave
  int          n_bus, delay;
  logic [31:0] last_adr, last_dat;
  logic        last_we;
  function automatic logic [31:0] rd_value(input logic [31:0] a);
    return {a[15:0], ~a[15:0]} ^ 32'h5A00_00A5;
  endfunction
  initial begin
    mac_rsp = '0; n_bus = 0;
    forever begin
      @(posedge clk);
      mac_rsp <= '0;
      if (rst_n && mac_req.cyc && mac_req.stb && !mac_rsp.ack) begin
        delay = $urandom_range(3);
        repeat (delay) @(posedge clk);
        last_adr = mac_req.adr; last_dat = mac_req.dat; last_we = mac_req.we;
        n_bus++;
        mac_rsp <= '{ack: 1'b1, dat: rd_value(mac_req.adr)};
        @(posedge clk);
        mac_rsp <= '0;
      end
    end
  end

  // ---------------------------------------------------------------- RAM shadow
  logic [15:0] ram [512];
  logic [8:0]  ram_written [$];
  always @(posedge clk) if (ram_we) begin
    ram[ram_waddr] <= ram_wdata;
    ram_written.push_back(ram_waddr);
  end

  // ---------------------------------------------------------------- core side
  task automatic set_porta(input logic [7:0] v);
    @(posedge clk);
    porta <= v;
  endtask
  task automatic put_b(input logic [7:0] v);
    @(posedge clk);
    portb <= v; portb_we <= 1'b1;
    @(posedge clk);
    portb_we <= 1'b0;
  endtask

  task automatic reg_write(input logic [31:0] a, input logic [31:0] d);
    set_porta(8'h82);
    for (int i = 3; i >= 0; i--) put_b(a[8*i +: 8]);
    for (int i = 3; i >= 0; i--) put_b(d[8*i +: 8]);
    repeat (6) @(posedge clk);
    set_porta(8'h01);
  endtask

  task automatic reg_read(input logic [31:0] a, output logic [31:0] d);
    set_porta(8'h80);
    for (int i = 3; i >= 0; i--) put_b(a[8*i +: 8]);
    repeat (6) @(posedge clk);
    for (int i = 3; i >= 0; i--) begin
      d[8*i +: 8] = pinb;
      put_b(8'h00);
      @(posedge clk);
    end
    set_porta(8'h01);
  endtask

  // ---------------------------------------------------------------- frame master
  task automatic dma_write(input logic [31:0] a, input logic [31:0] d, output int lat);
    @(posedge clk);
    dma_req <= '{cyc: 1'b1, stb: 1'b1, we: 1'b1, adr: a, dat: d, sel: 4'hF};
    lat = 0;
    do begin @(posedge clk); lat++; end while (!dma_rsp.ack);
    dma_req <= '0;
  endtask

  initial begin
    logic [31:0] d;
    logic [7:0]  fr [];
    int          lat, nb, nw, t0;
    bit          lat_ok;
    porta = 8'h00; portb = 8'h00; portb_we = 1'b0; mac_int = 1'b0; dma_req = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    check(pind == 8'h00 && !test_active && !mac_req.stb, "idle after reset");

    // ---- register writes
    for (int n = 0; n < 8; n++) begin
      logic [31:0] a, v;
      a = $urandom; v = $urandom;
      reg_write(a, v);
      check(n_bus == n + 1 && last_we && last_adr == a && last_dat == v,
            $sformatf("register write %0d: adr %h dat %h (saw %h %h, %0d bus cycles)", n, a, v, last_adr, last_dat, n_bus));
    end

    // ---- register reads
    for (int n = 0; n < 8; n++) begin
      logic [31:0] a;
      int          nb0;
      a = $urandom;
      nb0 = n_bus;
      reg_read(a, d);
      check(n_bus == nb0 + 1 && !last_we && last_adr == a, $sformatf("register read %0d bus cycle", n));
      check(d == rd_value(a), $sformatf("register read %0d data %h expected %h", n, d, rd_value(a)));
    end

    // ---- stop aborts a sequence
    nb = n_bus;
    set_porta(8'h82);
    put_b(8'h12); put_b(8'h34);
    set_porta(8'h01);
    repeat (4) @(posedge clk);
    set_porta(8'h00);
    put_b(8'h55); put_b(8'h66); put_b(8'h77); put_b(8'h88);
    repeat (4) @(posedge clk);
    check(n_bus == nb, "stop aborts, stray port-B bytes start nothing");
    reg_write(32'hCAFE_0010, 32'h0BAD_F00D);
    check(last_adr == 32'hCAFE_0010 && last_dat == 32'h0BAD_F00D, "write after abort");

    // ---- frame storage: 14-byte header and 2*N payload bytes
    nw = 12;
    fr = new[4*nw];
    foreach (fr[i]) fr[i] = 8'($urandom);
    ram_written.delete();
    lat_ok = 1;
    for (int k = 0; k < nw; k++) begin
      dma_write(32'(4*k), {fr[4*k], fr[4*k+1], fr[4*k+2], fr[4*k+3]}, lat);
      if (lat != 3) begin
        lat_ok = 0;
        $display("frame word %0d latency %0d", k, lat);
      end
    end
    check(lat_ok, "each frame word accepted on the third clock edge after its request");
    @(posedge clk);
    for (int w = 0; w < 7; w++)
      check(ram[w] == {fr[2*w], fr[2*w+1]}, $sformatf("header word %0d", w));
    for (int w = 8; w < 2*nw + 1; w++)
      check(ram[w] == {fr[2*w-2], fr[2*w-1]}, $sformatf("payload word %h", w));
    check(ram_written.size() == 2*nw, "one RAM write per frame halfword");
    check(!test_active && pind == 8'h00, "no test before the interrupt");

    // ---- interrupt starts the test
    @(posedge clk);
    mac_int <= 1'b1;
    t0 = 0;
    while (!test_active && t0 < 10) begin @(posedge clk); t0++; end
    check(t0 == 4, $sformatf("test starts 4 cycles after the interrupt (%0d)", t0));
    #1;
    check(pind == 8'hFF, "port D = FFh during the test");
    check(ram[7] == 16'(4*nw), "byte count in word 7");
    repeat (5) @(posedge clk);
    check(test_active, "test stays active while the interrupt line stays high");

    // ---- program end
    set_porta(8'h40);
    @(posedge clk); #1;
    check(!test_active && pind == 8'h00, "test ends the cycle after port A bit 6");

    // ---- a new frame while bit 6 is still high waits
    mac_int <= 1'b0;
    @(posedge clk);
    mac_int <= 1'b1;
    repeat (6) @(posedge clk);
    check(!test_active, "no test start while port A bit 6 is high");
    set_porta(8'h20);
    repeat (4) @(posedge clk);
    check(test_active && pind == 8'hFF, "held-off test starts once bit 6 drops");
    set_porta(8'h60);
    repeat (2) @(posedge clk);
    check(!test_active, "second test ends");

    // ---- frame words beyond the RAM are acknowledged, not stored
    ram_written.delete();
    dma_write(32'h0000_0800, 32'h1234_5678, lat);
    check(ram_written.size() == 0, "word beyond the RAM window not stored");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
