// Test circuit for running Ethernet-delivered test programs on an 8-bit AVR
// core: the control and interface block (CIB), the memory control, the PROM
// and the test-code RAM, wired as in the control-memories diagram.
//
// The AVR core and the Ethernet MAC are separate, existing cores and attach
// through this module's ports:
//   * core side: the program counter in, the instruction word out (zero
//     added latency: both memories and the selection are combinational on the
//     PC); port A and port B outputs with a port-B write strobe in; the
//     port-B and port-D input pins out.
//   * MAC side: a register bus master (32-bit address and data), a frame-store
//     slave through which the MAC writes a received frame, and the MAC's
//     interrupt.
// Flow: after reset the core runs the PROM, which configures the MAC through
// the port A/B protocol and waits.  The MAC stores a frame in the RAM and
// interrupts; the CIB switches the low 512 words of the instruction space to
// the RAM and drives FFh on port D so that the core jumps to 0008h, the first
// word of the test program.  The program reports its result on port A bit 5
// and ends by setting port A bit 6, which switches the PROM back in.
// test_active, prom_cs and ram_sel are brought out for observation (for
// example LEDs or a logic analyser).
module avr_test_top
  import avr_test_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  // AVR core
  input  logic [PC_W-1:0] core_pc,
  output logic [15:0]     core_inst,
  input  logic [7:0]      porta,
  input  logic [7:0]      portb,
  input  logic            portb_we,
  output logic [7:0]      pinb,
  output logic [7:0]      pind,
  // Ethernet MAC
  output wb_req_t         mac_req,
  input  wb_rsp_t         mac_rsp,
  input  wb_req_t         dma_req,
  output wb_rsp_t         dma_rsp,
  input  logic            mac_int,
  // observation
  output logic            test_active,
  output logic            prom_cs,
  output logic            ram_sel
);

  localparam int unsigned RAM_AW = $clog2(RAM_WORDS);

  logic              ram_we;
  logic [RAM_AW-1:0] ram_waddr;
  logic [15:0]       ram_wdata, ram_rdata, prom_data;

  cib #(.RAM_DEPTH(RAM_WORDS), .HDR(HDR_WORDS)) u_cib (
    .clk, .rst_n,
    .porta, .portb, .portb_we, .pinb, .pind,
    .mac_req, .mac_rsp, .dma_req, .dma_rsp, .mac_int,
    .ram_we, .ram_waddr, .ram_wdata,
    .test_active
  );

  test_ram #(.WORDS(RAM_WORDS), .WIDTH(16)) u_ram (
    .clk,
    .we    (ram_we),
    .waddr (ram_waddr),
    .wdata (ram_wdata),
    .raddr (core_pc[RAM_AW-1:0]),
    .rdata (ram_rdata)
  );

  prog_rom #(.ADDR_W(PC_W)) u_prom (
    .addr (core_pc),
    .cs   (prom_cs),
    .data (prom_data)
  );

  mem_ctrl #(.RAM_DEPTH(RAM_WORDS)) u_mem_ctrl (
    .core_pc,
    .test_active,
    .prog_end  (porta[PA_END]),
    .prom_data,
    .ram_data  (ram_rdata),
    .prom_cs,
    .ram_sel,
    .core_inst
  );

endmodule
