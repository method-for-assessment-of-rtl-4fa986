// Memory control: selects which program memory feeds the core.
//
// The core's program counter addresses the PROM and the test RAM at the same
// time.  While a test is running (test_active from the control and interface
// block) and port A bit 6 ("program end") is low, fetches from word addresses
// below 0200h come from the RAM; fetches at 0200h and above, and every fetch
// outside a test, come from the PROM.  The PROM's chip select is the inverse
// of the RAM selection.  The selection is purely combinational on the PC and
// port A, so the instruction is available in the same cycle either way and
// switching memories adds no wait states; the moment the test program writes
// "program end" to port A, the next fetch already comes from the PROM.
// The address map, the use of PC and port A bit 6, and the chip select follow
// the method; gating with test_active is this design's reading of when RAM is
// in use.
module mem_ctrl
  import avr_test_pkg::*;
#(
  parameter int unsigned RAM_DEPTH = RAM_WORDS
) (
  input  logic [PC_W-1:0] core_pc,
  input  logic            test_active,
  input  logic            prog_end,     // port A bit 6
  input  logic [15:0]     prom_data,
  input  logic [15:0]     ram_data,
  output logic            prom_cs,
  output logic            ram_sel,
  output logic [15:0]     core_inst
);

  always_comb begin
    ram_sel   = test_active && !prog_end && (core_pc < PC_W'(RAM_DEPTH));
    prom_cs   = !ram_sel;
    core_inst = ram_sel ? ram_data : prom_data;
  end

endmodule
