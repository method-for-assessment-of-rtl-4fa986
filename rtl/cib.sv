// CIB: control and interface block between the AVR core and the Ethernet MAC.
//
// Three jobs:
//
// 1. Register access for the core.  The core has only 8-bit ports, the MAC
//    has 32-bit registers.  Port A is the control port (bit 7 start, bit 6
//    program end, bit 5 status, bit 1 operation, bit 0 stop); port B carries
//    the bytes.  When start rises (stop low) the block latches the operation
//    bit (1 = write) and counts the next four port-B writes as the register
//    address and, for a write, the next four as the data, most significant
//    byte first.  It then runs one bus cycle on the MAC register bus.  For a
//    read, the returned word is offered on the port-B input pins, most
//    significant byte first; each further port-B write by the core steps to
//    the next byte.  The block then waits for start to fall or stop to rise.
//    Stop returns the sequence to idle from any state but the bus cycle.
//
// 2. Frame storage.  The MAC writes a received frame as 32-bit big-endian
//    words (first byte in bits 31:24) through a Wishbone-style slave port,
//    frame byte 0 at byte address 0.  Each word is written into the 16-bit
//    RAM as two halfwords in two cycles, then acknowledged.  Frame halfwords
//    0-6 (destination, source, length field) go to RAM words 0-6; halfword 7
//    onward (the payload, i.e. the test program) goes to RAM word 8 onward.
//    RAM word 7 receives the number of bytes stored, written when the frame
//    is complete.  So the first payload word lands at 0008h.
//
// 3. Test control.  A rising edge of the MAC interrupt marks a complete
//    frame.  When port A bit 6 is low the block writes the byte count,
//    raises test_active and drives FFh on port D, which the core takes as an
//    interrupt to word address 0008h.  test_active makes the memory control
//    fetch from RAM.  When the test program sets port A bit 6 the test is
//    over: test_active and port D drop and the core is back on the PROM.
//
// Timing: port-B bytes are taken on the core's port-B write strobe; a
// register bus cycle starts the cycle after the last byte and lasts until
// the MAC acknowledges.  A frame word costs three cycles (two RAM writes and
// the idle cycle after the acknowledge).  port D follows test_active.
//
// From the method: port A/B roles and bit positions, the 4+4 byte split of
// address and data, the RAM layout (header 0000h-0007h, code from 0008h), FFh
// on port D, the end of a test on port A bit 6.  This design's own choices:
// the port-B write strobe as the byte qualifier, byte order, the read-data
// path on the port-B pins, the bus protocol, the halfword mapping and the
// byte count in word 7.
// The bus-rule assertions at the end use the reset synchronously (disable
// iff) while the flops reset asynchronously; lint reports the mixed use, and
// it concerns only the assertions.
module cib
  import avr_test_pkg::*;
#(
  parameter int unsigned RAM_DEPTH = RAM_WORDS,
  parameter int unsigned HDR       = HDR_WORDS,
  parameter int unsigned RAM_AW    = $clog2(RAM_DEPTH)
) (
  input  logic              clk,
  input  logic              rst_n,
  // core ports
  input  logic [7:0]        porta,      // control port (core output)
  input  logic [7:0]        portb,      // data port (core output)
  input  logic              portb_we,   // core wrote port B this cycle
  output logic [7:0]        pinb,       // read data to the core's port-B pins
  output logic [7:0]        pind,       // FFh while a test runs
  // MAC register bus (master)
  output wb_req_t           mac_req,
  input  wb_rsp_t           mac_rsp,
  // MAC frame-store bus (slave)
  input  wb_req_t           dma_req,
  output wb_rsp_t           dma_rsp,
  input  logic              mac_int,
  // test RAM write port
  output logic              ram_we,
  output logic [RAM_AW-1:0] ram_waddr,
  output logic [15:0]       ram_wdata,
  // to the memory control
  output logic              test_active
);

  // ------------------------------------------------------------ register access
  typedef enum logic [2:0] {P_IDLE, P_ADDR, P_DATA, P_BUS, P_RDATA, P_HOLD} pstate_t;

  pstate_t     pstate;
  logic [1:0]  pcnt;
  logic        op_wr;
  logic [31:0] radr, rdat;

  wire start_bit = porta[PA_START];
  wire stop_bit  = porta[PA_STOP];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pstate <= P_IDLE;
      pcnt   <= '0;
      op_wr  <= 1'b0;
      radr   <= '0;
      rdat   <= '0;
    end else begin
      unique case (pstate)
        P_IDLE: if (start_bit && !stop_bit) begin
          op_wr  <= porta[PA_OP];
          pcnt   <= '0;
          pstate <= P_ADDR;
        end
        P_ADDR: if (stop_bit) pstate <= P_IDLE;
          else if (portb_we) begin
            radr <= {radr[23:0], portb};
            pcnt <= pcnt + 2'd1;
            if (pcnt == 2'd3) pstate <= op_wr ? P_DATA : P_BUS;
          end
        P_DATA: if (stop_bit) pstate <= P_IDLE;
          else if (portb_we) begin
            rdat <= {rdat[23:0], portb};
            pcnt <= pcnt + 2'd1;
            if (pcnt == 2'd3) pstate <= P_BUS;
          end
        P_BUS: if (mac_rsp.ack) begin
          if (!op_wr) rdat <= mac_rsp.dat;
          pcnt   <= '0;
          pstate <= op_wr ? P_HOLD : P_RDATA;
        end
        P_RDATA: if (stop_bit) pstate <= P_IDLE;
          else if (portb_we) begin
            rdat <= {rdat[23:0], 8'h00};
            pcnt <= pcnt + 2'd1;
            if (pcnt == 2'd3) pstate <= P_HOLD;
          end
        P_HOLD: if (!start_bit || stop_bit) pstate <= P_IDLE;
        default: pstate <= P_IDLE;
      endcase
    end
  end

  always_comb begin
    mac_req     = '0;
    mac_req.cyc = (pstate == P_BUS);
    mac_req.stb = (pstate == P_BUS);
    mac_req.we  = op_wr;
    mac_req.adr = radr;
    mac_req.dat = rdat;
    mac_req.sel = 4'hF;
  end

  assign pinb = rdat[31:24];

  // ------------------------------------------------------------ frame storage
  typedef enum logic [2:0] {F_IDLE, F_WR_HI, F_WR_LO, F_RD_ACK, F_SIZE} fstate_t;

  fstate_t     fstate;
  logic [31:0] fword;
  logic [3:0]  fsel;
  logic [RAM_AW-1:0] fhw;          // frame halfword index of the high half
  logic        fover;              // word lies beyond the RAM window
  logic [15:0] fbytes;             // bytes stored since the frame start
  logic        int_q, int_pend;

  // RAM word of frame halfword p: the header keeps its place, the payload
  // moves up by one word to leave room for the byte count in word HDR-1.
  function automatic logic [RAM_AW:0] ram_word(input logic [RAM_AW-1:0] p);
    return (p < RAM_AW'(HDR - 1)) ? {1'b0, p} : {1'b0, p} + 1'b1;
  endfunction

  logic [RAM_AW:0] hw_word;
  always_comb hw_word = ram_word(fstate == F_WR_LO ? {fhw[RAM_AW-1:1], 1'b1} : fhw);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fstate      <= F_IDLE;
      fword       <= '0;
      fsel        <= '0;
      fhw         <= '0;
      fover       <= 1'b0;
      fbytes      <= '0;
      int_q       <= 1'b0;
      int_pend    <= 1'b0;
      test_active <= 1'b0;
    end else begin
      int_q <= mac_int;
      if (mac_int && !int_q) int_pend <= 1'b1;
      if (test_active && porta[PA_END]) test_active <= 1'b0;
      unique case (fstate)
        F_IDLE: if (dma_req.cyc && dma_req.stb) begin
          fword  <= dma_req.dat;
          fsel   <= dma_req.sel;
          fhw    <= {dma_req.adr[RAM_AW:2], 1'b0};
          fover  <= |dma_req.adr[31:RAM_AW+1];
          fstate <= dma_req.we ? F_WR_HI : F_RD_ACK;
        end else if (int_pend && !test_active && !porta[PA_END]) begin
          fstate <= F_SIZE;
        end
        F_WR_HI: fstate <= F_WR_LO;
        F_WR_LO: begin
          if (!fover) fbytes <= 16'({fhw, 1'b0}) + 16'd4;
          fstate <= F_IDLE;
        end
        F_RD_ACK: fstate <= F_IDLE;
        F_SIZE: begin
          int_pend    <= 1'b0;
          test_active <= 1'b1;
          fstate      <= F_IDLE;
        end
        default: fstate <= F_IDLE;
      endcase
    end
  end

  always_comb begin
    ram_we    = 1'b0;
    ram_waddr = hw_word[RAM_AW-1:0];
    ram_wdata = fword[31:16];
    unique case (fstate)
      F_WR_HI: ram_we = (|fsel[3:2]) && !fover && (hw_word < (RAM_AW+1)'(RAM_DEPTH));
      F_WR_LO: begin
        ram_we    = (|fsel[1:0]) && !fover && (hw_word < (RAM_AW+1)'(RAM_DEPTH));
        ram_wdata = fword[15:0];
      end
      F_SIZE: begin
        ram_we    = 1'b1;
        ram_waddr = RAM_AW'(HDR - 1);
        ram_wdata = fbytes;
      end
      default: ;
    endcase
  end

  always_comb begin
    dma_rsp     = '0;
    dma_rsp.ack = (fstate == F_WR_LO) || (fstate == F_RD_ACK);
  end

  assign pind = test_active ? 8'hFF : 8'h00;

  // ------------------------------------------------------------ bus rules
  // The register-bus request stays up, unchanged, until it is acknowledged.
  a_mac_hold: assert property (@(posedge clk) disable iff (!rst_n)
    mac_req.stb && !mac_rsp.ack |=> mac_req.stb && $stable(mac_req.adr) && $stable(mac_req.we));
  // An acknowledge only answers a request.
  a_dma_ack: assert property (@(posedge clk) disable iff (!rst_n)
    dma_rsp.ack |-> dma_req.cyc && dma_req.stb);

endmodule
