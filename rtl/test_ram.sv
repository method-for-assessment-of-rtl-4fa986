// Test-code RAM.
//
// 16-bit-wide memory that receives an Ethernet frame and is then executed by
// the core: words 0000h-0007h hold the frame header (destination and source
// MAC address, length field, stored byte count) and the test program starts
// at word 0008h.  The default depth of 512 words covers the RAM window
// 0000h-01FFh of the instruction address map.
//
// Interface: one synchronous write port (written by the control and interface
// block while a frame arrives) and one combinational read port addressed by
// the core's program counter, so an instruction is available in the cycle its
// address is presented.  There is no reset; words that have not been written
// hold whatever the memory powered up with.  The asynchronous read is this
// design's choice, made so that switching between PROM and RAM adds no delay.
module test_ram #(
  parameter int unsigned WORDS  = 512,
  parameter int unsigned WIDTH  = 16,
  parameter int unsigned ADDR_W = $clog2(WORDS)
) (
  input  logic              clk,
  input  logic              we,
  input  logic [ADDR_W-1:0] waddr,
  input  logic [WIDTH-1:0]  wdata,
  input  logic [ADDR_W-1:0] raddr,
  output logic [WIDTH-1:0]  rdata
);

  logic [WIDTH-1:0] mem [WORDS];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  assign rdata = mem[raddr];

endmodule
