// Program memory (PROM) of the test circuit.
//
// Holds the fixed program the core runs outside a test: the reset jump, the
// start-up code that configures the Ethernet MAC through the control port,
// and the post-test handler that re-arms the MAC for the next frame.  The
// contents are computed at elaboration by avr_test_pkg::build_prom(), so no
// memory-initialisation file is needed.
//
// Interface: a word address from the core's program counter, a chip select,
// and a 16-bit instruction word.  The read is combinational, so an
// instruction is available in the same cycle as its address, like the
// converter-generated PROM of the original core; when the chip select is low
// the output is 0000h.  Addresses beyond the PROM read as 0000h (nop).
// The chip select and the address map (PROM above 0200h and whenever no
// test is running) follow the method; the program itself and the 1024-word
// depth are this design's choices.
module prog_rom
  import avr_test_pkg::*;
#(
  parameter int unsigned ADDR_W = PC_W
) (
  input  logic [ADDR_W-1:0] addr,
  input  logic              cs,
  output logic [15:0]       data
);

  localparam prom_image_t IMAGE = build_prom();

  always_comb begin
    data = 16'h0000;
    if (cs && addr < ADDR_W'(PROM_WORDS)) data = IMAGE[addr[$clog2(PROM_WORDS)-1:0]];
  end

endmodule
