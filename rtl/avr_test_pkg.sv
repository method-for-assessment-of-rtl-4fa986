// Shared constants, types and helper functions of the Ethernet-loaded
// microcontroller test circuit.
//
// The test circuit lets an 8-bit AVR core run test programs that arrive in
// Ethernet frames.  A frame is stored in a small RAM, the core is sent to word
// address 0008h by an interrupt, and the program memory (PROM) is switched out
// of the instruction path until the test program raises the "program end" bit
// of port A.  This package holds what the blocks share:
//   * the instruction address map (RAM 0000h-01FFh, header in 0000h-0007h,
//     test code from 0008h, PROM main program from 0200h),
//   * the bit assignment of the control port (port A),
//   * a Wishbone-style request/response pair used for the MAC register bus and
//     for the MAC's frame-store (DMA) writes,
//   * the register map of the Ethernet MAC that the start-up code programs,
//   * encoders for the AVR instructions the start-up code uses, and the
//     function that builds the PROM image from them.
// The address map and port A bits follow the method description; the MAC
// register offsets follow the register map of the widely used open-source
// Ethernet MAC core; the PROM program itself is this design's own.
package avr_test_pkg;

  // ---------------------------------------------------------------- sizes
  localparam int unsigned PC_W        = 16;      // AVR word address width
  localparam int unsigned RAM_WORDS   = 512;     // 0000h..01FFh
  localparam int unsigned HDR_WORDS   = 8;       // 0000h..0007h: frame header
  localparam int unsigned PROM_WORDS  = 1024;    // 0000h..03FFh
  localparam logic [15:0] CODE_START  = 16'h0008; // first test-code word
  localparam logic [15:0] PROM_MAIN   = 16'h0200; // PROM main program

  // --------------------------------------------------- port A (control port)
  localparam int unsigned PA_START  = 7;
  localparam int unsigned PA_END    = 6;   // "program end"
  localparam int unsigned PA_STATUS = 5;
  localparam int unsigned PA_OP     = 1;   // 1 = register write, 0 = read
  localparam int unsigned PA_STOP   = 0;

  // --------------------------------------------------- AVR I/O addresses
  localparam logic [5:0] IO_PIND  = 6'h10;
  localparam logic [5:0] IO_DDRD  = 6'h11;
  localparam logic [5:0] IO_PORTD = 6'h12;
  localparam logic [5:0] IO_PINB  = 6'h16;
  localparam logic [5:0] IO_DDRB  = 6'h17;
  localparam logic [5:0] IO_PORTB = 6'h18;
  localparam logic [5:0] IO_PINA  = 6'h19;
  localparam logic [5:0] IO_DDRA  = 6'h1A;
  localparam logic [5:0] IO_PORTA = 6'h1B;

  // --------------------------------------------------- bus types
  typedef struct packed {
    logic        cyc;
    logic        stb;
    logic        we;
    logic [31:0] adr;   // byte address
    logic [31:0] dat;
    logic [3:0]  sel;
  } wb_req_t;

  typedef struct packed {
    logic        ack;
    logic [31:0] dat;
  } wb_rsp_t;

  // --------------------------------------------------- MAC register map
  localparam logic [31:0] MAC_MODER      = 32'h0000_0000;
  localparam logic [31:0] MAC_INT_SOURCE = 32'h0000_0004;
  localparam logic [31:0] MAC_INT_MASK   = 32'h0000_0008;
  localparam logic [31:0] MAC_PACKETLEN  = 32'h0000_0018;
  localparam logic [31:0] MAC_ADDR0      = 32'h0000_0040;
  localparam logic [31:0] MAC_ADDR1      = 32'h0000_0044;
  localparam logic [31:0] MAC_RXBD0_CTRL = 32'h0000_0600;
  localparam logic [31:0] MAC_RXBD0_PTR  = 32'h0000_0604;

  // MODER: RXEN | FULLD | CRCEN | PAD | RECSMALL
  localparam logic [31:0] MODER_CFG     = 32'h0001_A401;
  // PACKETLEN: minimum 32 bytes, maximum 1536 bytes
  localparam logic [31:0] PACKETLEN_CFG = 32'h0020_0600;
  localparam logic [31:0] INT_RXB       = 32'h0000_0004;
  // RX buffer descriptor: empty | irq | wrap
  localparam logic [31:0] RXBD_ARM      = 32'h0000_E000;
  // Station address of the test circuit: 00:13:20:3e:ab:cd
  localparam logic [31:0] STATION_ADDR0 = 32'h203E_ABCD;
  localparam logic [31:0] STATION_ADDR1 = 32'h0000_0013;

  // --------------------------------------------------- AVR instruction encoders
  function automatic logic [15:0] enc_ldi(input int unsigned d, input logic [7:0] k);
    logic [3:0] dd;
    dd = 4'(d - 16);
    return {4'b1110, k[7:4], dd, k[3:0]};
  endfunction

  function automatic logic [15:0] enc_cpi(input int unsigned d, input logic [7:0] k);
    logic [3:0] dd;
    dd = 4'(d - 16);
    return {4'b0011, k[7:4], dd, k[3:0]};
  endfunction

  function automatic logic [15:0] enc_ori(input int unsigned d, input logic [7:0] k);
    logic [3:0] dd;
    dd = 4'(d - 16);
    return {4'b0110, k[7:4], dd, k[3:0]};
  endfunction

  function automatic logic [15:0] enc_andi(input int unsigned d, input logic [7:0] k);
    logic [3:0] dd;
    dd = 4'(d - 16);
    return {4'b0111, k[7:4], dd, k[3:0]};
  endfunction

  function automatic logic [15:0] enc_mov(input int unsigned d, input int unsigned r);
    logic [4:0] dd, rr;
    dd = 5'(d);
    rr = 5'(r);
    return {6'b001011, rr[4], dd, rr[3:0]};
  endfunction

  function automatic logic [15:0] enc_out(input logic [5:0] a, input int unsigned r);
    logic [4:0] rr;
    rr = 5'(r);
    return {5'b10111, a[5:4], rr, a[3:0]};
  endfunction

  function automatic logic [15:0] enc_in(input int unsigned d, input logic [5:0] a);
    logic [4:0] dd;
    dd = 5'(d);
    return {5'b10110, a[5:4], dd, a[3:0]};
  endfunction

  // Relative jump from word address pc to target.
  function automatic logic [15:0] enc_rjmp(input int pc, input int target);
    logic [11:0] k;
    k = 12'(target - pc - 1);
    return {4'b1100, k};
  endfunction

  // Conditional branch on Z (breq) or not Z (brne), from pc to target.
  function automatic logic [15:0] enc_brz(input bit on_set, input int pc, input int target);
    logic [6:0] k;
    k = 7'(target - pc - 1);
    return {5'b11110, ~on_set, k, 3'b001};
  endfunction

  localparam logic [15:0] OP_NOP = 16'h0000;
  localparam logic [15:0] OP_SEI = 16'h9478;
  localparam logic [15:0] OP_JMP = 16'h940C;  // first word, 16-bit target follows

  // --------------------------------------------------- PROM image
  typedef logic [15:0] prom_image_t [PROM_WORDS];

  // Register usage of the PROM program: r16 control byte, r17 data byte,
  // r18 read-back byte, r21 status bits kept on port A.
  //
  // A register write through the control port raises start with the write
  // operation bit, sends four address bytes and four data bytes (most
  // significant first) on port B, then raises stop.  A register read raises
  // start with the read operation bit, sends four address bytes, waits a few
  // cycles for the bus cycle, then four times reads PINB, writes a dummy
  // byte to port B to step to the next data byte and waits one cycle for the
  // step to take effect; r18 ends with the least significant byte.
  // reg_op_len/reg_op_word give the instruction sequence.
  localparam int unsigned REG_WR_LEN = 22;
  localparam int unsigned REG_RD_LEN = 30;

  function automatic int unsigned reg_op_len(input bit is_write);
    return is_write ? REG_WR_LEN : REG_RD_LEN;
  endfunction

  function automatic logic [15:0] reg_op_word(input bit is_write, input logic [31:0] adr,
                                              input logic [31:0] dat, input int unsigned idx);
    int unsigned n, b;
    n = reg_op_len(is_write);
    if (idx == 0 || idx == n - 3) return enc_mov(16, 21);
    if (idx == 1) return enc_ori(16, is_write ? 8'h82 : 8'h80);
    if (idx == n - 2) return enc_ori(16, 8'h01);
    if (idx == 2 || idx == n - 1) return enc_out(IO_PORTA, 16);
    if (idx <= 10) begin                      // address bytes
      b = (idx - 3) / 2;
      return ((idx - 3) % 2 == 0) ? enc_ldi(17, adr[8*(3-b) +: 8]) : enc_out(IO_PORTB, 17);
    end
    if (is_write) begin                       // data bytes
      b = (idx - 11) / 2;
      return ((idx - 11) % 2 == 0) ? enc_ldi(17, dat[8*(3-b) +: 8]) : enc_out(IO_PORTB, 17);
    end
    if (idx <= 14) return OP_NOP;             // wait for the bus cycle
    case ((idx - 15) % 3)                     // in, dummy out, nop
      0:       return enc_in(18, IO_PINB);
      1:       return enc_out(IO_PORTB, 18);
      default: return OP_NOP;
    endcase
  endfunction

  // Start-up register writes, in order.
  localparam int unsigned N_CFG = 7;
  function automatic logic [63:0] cfg_write(input int unsigned i);
    case (i)
      0: return {MAC_PACKETLEN,  PACKETLEN_CFG};
      1: return {MAC_ADDR0,      STATION_ADDR0};
      2: return {MAC_ADDR1,      STATION_ADDR1};
      3: return {MAC_INT_MASK,   INT_RXB};
      4: return {MAC_RXBD0_PTR,  32'h0};
      5: return {MAC_RXBD0_CTRL, RXBD_ARM};
      default: return {MAC_MODER, MODER_CFG};
    endcase
  endfunction

  // Builds the PROM:
  //   0000h       jmp 0200h (reset)
  //   0002h-01FFh rjmp to the post-test handler: when a test program ends,
  //               the core keeps its PC but fetches from the PROM again, so
  //               every word of this window leads back into the PROM program.
  //   0200h       start-up: port directions, MAC configuration, read-back
  //               check of MODER, enable interrupts, wait for a frame.
  //   handler     clear the MAC receive interrupt, re-arm the receive
  //               descriptor, drop "program end" keeping "status", wait.
  function automatic prom_image_t build_prom();
    prom_image_t img;
    int pc, wait_pc, halt_pc, post_pc, br_pc;
    logic [63:0] op;
    for (int i = 0; i < int'(PROM_WORDS); i++) img[i] = OP_NOP;
    img[0] = OP_JMP;
    img[1] = PROM_MAIN;
    pc = int'(PROM_MAIN);
    img[pc] = enc_ldi(21, 8'h00);     pc++;
    img[pc] = enc_ldi(16, 8'hFF);     pc++;
    img[pc] = enc_out(IO_DDRA, 16);   pc++;
    img[pc] = enc_out(IO_DDRB, 16);   pc++;
    img[pc] = enc_ldi(16, 8'h00);     pc++;
    img[pc] = enc_out(IO_DDRD, 16);   pc++;
    img[pc] = enc_out(IO_PORTA, 16);  pc++;
    for (int unsigned c = 0; c < N_CFG; c++) begin
      op = cfg_write(c);
      for (int unsigned k = 0; k < REG_WR_LEN; k++) begin
        img[pc] = reg_op_word(1'b1, op[63:32], op[31:0], k);
        pc++;
      end
    end
    for (int unsigned k = 0; k < REG_RD_LEN; k++) begin
      img[pc] = reg_op_word(1'b0, MAC_MODER, 32'h0, k);
      pc++;
    end
    img[pc] = enc_cpi(18, MODER_CFG[7:0]); pc++;
    br_pc = pc;                       pc++;   // brne halt, patched below
    img[pc] = OP_SEI;                 pc++;
    wait_pc = pc;
    img[pc] = enc_rjmp(pc, pc);       pc++;   // wait for a frame
    halt_pc = pc;
    img[pc] = enc_rjmp(pc, pc);       pc++;   // configuration check failed
    img[br_pc] = enc_brz(1'b0, br_pc, halt_pc);
    post_pc = pc;
    img[pc] = enc_in(21, IO_PORTA);   pc++;
    img[pc] = enc_andi(21, 8'h20);    pc++;
    for (int unsigned k = 0; k < REG_WR_LEN; k++) begin
      img[pc] = reg_op_word(1'b1, MAC_INT_SOURCE, INT_RXB, k);
      pc++;
    end
    for (int unsigned k = 0; k < REG_WR_LEN; k++) begin
      img[pc] = reg_op_word(1'b1, MAC_RXBD0_CTRL, RXBD_ARM, k);
      pc++;
    end
    img[pc] = enc_out(IO_PORTA, 21);  pc++;
    img[pc] = OP_SEI;                 pc++;
    img[pc] = enc_rjmp(pc, wait_pc);  pc++;
    for (int a = 2; a < int'(PROM_MAIN); a++) img[a] = enc_rjmp(a, post_pc);
    return img;
  endfunction

endpackage
