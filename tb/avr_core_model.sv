// Behavioural model of the AVR core, for simulation only (not the real core).
//
// Executes the subset of the AVR instruction set used by the PROM program and
// by the example test programs: ldi, mov, andi, ori, cpi, inc, dec, in, out,
// rjmp, jmp, breq, brne, sei, nop.  Only the Z flag is modelled; there is no
// data memory and no stack, and an interrupt does not push a return address.
// Each one-word instruction takes one clock, jmp takes two (its second word
// is fetched in the next cycle).  The instruction word is read combinationally
// from `inst` for the current `pc`.
//
// I/O: ports A, B and D with ATmega103 I/O addresses.  Writing PORTB gives a
// one-cycle `portb_we` strobe together with the new value.  Reading PINB and
// PIND returns the `pinb` and `pind` inputs, PINA returns port A.
// inject_fault breaks inc (the carry from bit 2 into bit 3 is lost), to
// show that a test program detects a fault in the core.
// Interrupt: while the I flag is set and port D pin 3 is high, the model
// jumps to word address 0008h and clears I (external interrupt 3 vector).
module avr_core_model
  import avr_test_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  output logic [15:0] pc,
  input  logic [15:0] inst,
  output logic [7:0]  porta,
  output logic [7:0]  portb,
  output logic        portb_we,
  input  logic [7:0]  pinb,
  input  logic [7:0]  pind,
  input  logic        inject_fault, // inc drops the carry from bit 2 into bit 3
  output int          n_exec,      // instructions executed
  output int          n_illegal,   // words not in the subset
  output int          n_irq        // interrupts taken
);

  logic [7:0] r [32];
  logic       zf, iflag, jmp_pend;
  logic [7:0] ddra, ddrb, ddrd;

  function automatic logic [7:0] io_rd(input logic [5:0] a);
    case (a)
      IO_PINA:  return porta;
      IO_PORTA: return porta;
      IO_DDRA:  return ddra;
      IO_PINB:  return pinb;
      IO_PORTB: return portb;
      IO_DDRB:  return ddrb;
      IO_PIND:  return pind;
      IO_DDRD:  return ddrd;
      default:  return 8'h00;
    endcase
  endfunction

  logic [4:0] d5, r5;
  logic [3:0] d4;
  logic [7:0] k8, res;
  logic [5:0] ioa;
  always_comb begin
    d5  = inst[8:4];
    r5  = {inst[9], inst[3:0]};
    d4  = inst[7:4];
    k8  = {inst[11:8], inst[3:0]};
    ioa = {inst[10:9], inst[3:0]};
    res = 8'h00;
  end

  // inc, optionally with a design fault: the carry out of bits 2:0 is lost
  logic [7:0] inc_res;
  always_comb begin
    inc_res = r[d5] + 8'd1;
    if (inject_fault && r[d5][2:0] == 3'b111) inc_res[3] = r[d5][3];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pc        <= 16'h0000;
      zf        <= 1'b0;
      iflag     <= 1'b0;
      jmp_pend  <= 1'b0;
      porta     <= 8'h00;
      portb     <= 8'h00;
      portb_we  <= 1'b0;
      ddra      <= 8'h00;
      ddrb      <= 8'h00;
      ddrd      <= 8'h00;
      n_exec    <= 0;
      n_illegal <= 0;
      n_irq     <= 0;
      for (int i = 0; i < 32; i++) r[i] <= 8'h00;
    end else begin
      portb_we <= 1'b0;
      if (jmp_pend) begin
        pc       <= inst;
        jmp_pend <= 1'b0;
      end else if (iflag && pind[3]) begin
        pc    <= 16'h0008;
        iflag <= 1'b0;
        n_irq <= n_irq + 1;
      end else begin
        n_exec <= n_exec + 1;
        pc     <= pc + 16'd1;
        casez (inst)
          16'b1110_????_????_????: r[{1'b1, d4}] <= k8;                              // ldi
          16'b0010_11??_????_????: r[d5] <= r[r5];                                    // mov
          16'b0111_????_????_????: begin                                              // andi
            r[{1'b1, d4}] <= r[{1'b1, d4}] & k8;
            zf <= ((r[{1'b1, d4}] & k8) == 8'h00);
          end
          16'b0110_????_????_????: begin                                              // ori
            r[{1'b1, d4}] <= r[{1'b1, d4}] | k8;
            zf <= ((r[{1'b1, d4}] | k8) == 8'h00);
          end
          16'b0011_????_????_????: zf <= (r[{1'b1, d4}] == k8);                     // cpi
          16'b1001_010?_????_0011: begin                                              // inc
            r[d5] <= inc_res;
            zf    <= inc_res == 8'h00;
          end
          16'b1001_010?_????_1010: begin                                              // dec
            r[d5] <= r[d5] - 8'd1;
            zf    <= (r[d5] - 8'd1) == 8'h00;
          end
          16'b1011_0???_????_????: r[d5] <= io_rd(ioa);                               // in
          16'b1011_1???_????_????: begin                                              // out
            case (ioa)
              IO_PORTA: porta <= r[d5];
              IO_DDRA:  ddra  <= r[d5];
              IO_PORTB: begin portb <= r[d5]; portb_we <= 1'b1; end
              IO_DDRB:  ddrb  <= r[d5];
              IO_DDRD:  ddrd  <= r[d5];
              default: ;
            endcase
          end
          16'b1100_????_????_????: pc <= pc + 16'd1 + {{4{inst[11]}}, inst[11:0]};   // rjmp
          16'b1001_010?_????_110?: jmp_pend <= 1'b1;                                  // jmp
          16'b1111_00??_????_?001: if (zf)  pc <= pc + 16'd1 + {{9{inst[9]}}, inst[9:3]};  // breq
          16'b1111_01??_????_?001: if (!zf) pc <= pc + 16'd1 + {{9{inst[9]}}, inst[9:3]};  // brne
          16'h9478: iflag <= 1'b1;                                                    // sei
          16'h0000: ;                                                                 // nop
          default: n_illegal <= n_illegal + 1;
        endcase
      end
    end
  end

endmodule
