# Ethernet-loaded test harness for an 8-bit AVR core

Verifying a soft microcontroller core by simulation is slow: a few million
clock cycles of a test program can take the better part of an hour in an HDL
simulator. This design runs test programs on the core itself, in an FPGA, at
full speed. The FPGA is configured once. Each test program then comes in over
Ethernet as the payload of one raw Ethernet frame. The frame is stored in a
small RAM that is switched into the core's instruction space. The core runs the
program and reports pass or fail on an output port. Then it goes back to its
fixed program memory to wait for the next frame. Any host that can send a raw
Ethernet frame can drive it. No FPGA tool, memory-initialisation file or
rebuild is needed per test.

The RTL here is the glue around two existing cores, an ATmega103-compatible
AVR core and an Ethernet MAC (media access controller). Neither core is part of
this RTL. The glue is:

| module         | role |
|----------------|------|
| `cib`          | control and interface block: lets the core reach the MAC's 32-bit registers through two 8-bit ports, stores a received frame in the RAM, starts and ends a test |
| `mem_ctrl`     | picks PROM or RAM as the source of each instruction |
| `prog_rom`     | program memory: reset code, MAC start-up configuration, post-test handler |
| `test_ram`     | 512 × 16-bit RAM that holds the frame and the test program |
| `avr_test_top` | wires the four together; core and MAC signals are its ports |
| `avr_test_pkg` | shared constants, bus types, AVR instruction encoders, PROM image builder |

## How one test runs

1. After reset the core runs from the PROM. The start-up code sets up the MAC
   through the control port (port A) and the data port (port B): frame length
   limits, station address, receive interrupt, receive descriptor, and MODER
   (receive on, full duplex, short frames accepted). It reads MODER back and
   checks it, enables interrupts, and spins in a wait loop at or above 0200h.
2. A frame addressed to the station (00:13:20:3e:ab:cd) arrives. The MAC writes
   it into the RAM through the CIB and raises its interrupt.
3. The CIB writes the stored byte count into RAM word 7 and raises
   `test_active`. It drives FFh on the core's port D. The core takes this as
   external interrupt 3, whose vector is word address 0008h.
4. While `test_active` is high and port A bit 6 is low, fetches below 0200h
   come from the RAM. So the core runs the test program, which starts at 0008h.
   Fetches at 0200h and above still come from the PROM, so a test can call PROM
   routines.
5. The test writes its verdict to port A bit 5 (1 = pass). It sets port A bit 6
   ("program end") to finish. From the next fetch on, the PROM is back.
   `test_active` and port D drop one cycle later.
6. The core still holds a PC below 0200h, now pointing into the PROM. Every PROM
   word from 0002h to 01FFh is a relative jump to the post-test handler. The
   handler clears the MAC's receive interrupt and re-arms the receive
   descriptor. It then clears bit 6, keeps bit 5 so the verdict stays on that
   pin, re-enables interrupts and returns to the wait loop.

## Instruction address map and memory switching

```
word address   outside a test   during a test (test_active=1, port A bit 6 = 0)
0000h-0007h    PROM             RAM: frame header
0008h-01FFh    PROM             RAM: test program
0200h-03FFh    PROM             PROM
```

`mem_ctrl` computes `ram_sel = test_active && !porta[6] && pc < 0200h` and
sets `prom_cs = !ram_sel`. Both memories read combinationally from the PC, and
the selection is combinational too. An instruction is therefore available in
the cycle its address appears, from either memory. Switching memories costs
no wait state. Note that port A bit 6 acts on the very next fetch. It does not
wait for `test_active`, which is a register in the CIB.

Why PROM words 0002h-01FFh hold jumps: a test ends wherever its last `out` is.
The core then continues from PC+1 in the PROM. A one-word `rjmp` in every slot
of that window, all to the same handler, catches the core wherever it lands.
This holds even if it lands on the second word of a two-word instruction.

## Control port protocol (ports A and B)

Port A is the control port, written by the core:

| bit | 7     | 6           | 5      | 4-2    | 1         | 0    |
|-----|-------|-------------|--------|--------|-----------|------|
|     | start | program end | status | unused | operation | stop |

A register access:

1. Write port A with start = 1, stop = 0, and operation = 1 for a write or
   0 for a read.
2. Write four bytes to port B: the 32-bit register address, most significant
   byte first.
3. Write: write four more bytes to port B, the data, most significant first.
   The CIB runs the bus cycle after the eighth byte.
   Read: the CIB runs the bus cycle after the fourth address byte. It then
   presents the word on the core's port-B input pins, most significant byte
   first. Read PINB, then write any byte to port B to step to the next byte.
4. Write port A with stop = 1 (and start = 0). Stop also aborts a sequence that
   is still in progress, except during the bus cycle itself.

The CIB counts a byte each time the core writes port B. It needs a one-cycle
write strobe, `portb_we`, from the core along with the new port-B value.
Timing rules for software:

* A read's bus cycle starts the cycle after the fourth address byte. It ends
  when the MAC acknowledges. The PROM code waits four `nop`s before the first
  `in`. A slower MAC needs more.
* After the dummy write that steps to the next byte, the new byte shows on
  PINB two cycles after the `out`. The PROM code puts a `nop` between each
  dummy `out` and the next `in`.

## Frame storage

The MAC writes the frame (destination address first, no FCS) as 32-bit
big-endian words. Frame byte 0 is at bus address 0, in bits 31:24. The CIB
splits each word into two 16-bit RAM writes. It acknowledges the word on the
second write, so a word takes three clock cycles. The RAM layout is:

| RAM word | contents |
|----------|----------|
| 0-2      | destination MAC address |
| 3-5      | source MAC address |
| 6        | length/type field |
| 7        | number of bytes stored (a multiple of 4), written when the frame is complete |
| 8 …      | payload: frame halfword 7 onward = the test program |

The payload is moved up one word, so the first payload byte pair is the
instruction at 0008h, high byte first. A test program is thus sent as
big-endian 16-bit words straight after the length field. Words beyond the RAM
(more than 504 payload words) are acknowledged but dropped. The test starts on
the rising edge of the MAC interrupt. It is held off while port A bit 6 is
still high from a previous test.

## Writing a test program

Assemble it at `.org $0008`, byte-swap it to big-endian words, and put it
after the 14-byte Ethernet header. The example test (in `tb_avr_test_top`)
does the following:

* makes ports A and B outputs;
* clears r18 and counts it up 15 times, copying each value to port B;
* compares it with 15;
* on a mismatch, writes 40h to port A (end, status 0);
* otherwise writes 20h and then 60h (status 1, then end).

It is 20 words long. Sent with one pad byte, the frame is 55 bytes with a
41-byte payload. The test need not return or restore anything: the
PROM handler sets up what it needs and re-enables interrupts.

## Interfaces to the two external cores

Core side (ports of `avr_test_top`): `core_pc` in and `core_inst` out, port A
and port B outputs with the `portb_we` strobe, and `pinb` and `pind` for the
core's port-B and port-D input pins. The design relies on the following:

* FFh on port D must make the core jump to word address 0008h. That is the
  external interrupt 3 vector of the ATmega103, and the core's interrupt
  set-up must match. The simulation model takes it while port D bit 3 is
  high and interrupts are enabled;
* `in r, PORTA` returns the port A output latch;
* instructions are fetched combinationally from `core_inst`.

MAC side: `mac_req`/`mac_rsp` is a Wishbone-style register bus. The CIB
holds each request, unchanged, until `ack`; an assertion in `cib` checks
this. `dma_req`/`dma_rsp` is the MAC's
frame-store master. `mac_int` is the interrupt. The register offsets used by
the PROM (MODER 00h, INT_SOURCE 04h, INT_MASK 08h, PACKETLEN 18h,
MAC_ADDR0/1 40h/44h, receive descriptor 0 at 600h/604h) follow the usual
open-source Ethernet MAC core. The PROM program must be rebuilt for a MAC
with a different map.

## The PROM image

`prog_rom` has no initialisation file. `avr_test_pkg::build_prom()` assembles
the image at elaboration from small instruction encoders (`enc_ldi`,
`enc_out`, `enc_rjmp`, …). The start-up register values are in `cfg_write()`.
The register access sequences are in `reg_op_word()`. To change the start-up
configuration, edit those functions. Layout: `jmp 0200h` at 0000h, jumps to the
handler at 0002h-01FFh, the start-up code from 0200h, and the handler after
the wait loop. All else is `nop`.

## Simulation

Every testbench checks its own results. Each prints
`TB_RESULT checks=N failures=M` and ends. Example with Verilator 5:

```
verilator --binary --timing --assert -y rtl -y tb \
    rtl/avr_test_pkg.sv tb/tb_avr_test_top.sv --top-module tb_avr_test_top
./obj_dir/Vtb_avr_test_top
```

| testbench          | what it shows |
|--------------------|---------------|
| `tb_avr_test_top`  | whole flow at default sizes, with models of the core and MAC. Covers start-up configuration (7 writes, 1 read-back), a passing and a failing test, a frame for another station that the MAC drops, and a second passing test after re-arming. Checks the port-B count sequence, the verdicts, that word 0008h comes from RAM in its address cycle, the test's cycle count (119 cycles from `test_active` rising to port A bit 6 for the example), the return to the PROM, and that each mechanism occurred |
| `tb_avr_test_workloads` | a nested-loop test of 5,060,329 cycles run from RAM, with the cycle count checked against the loop structure (101 ms of hardware time at 50 MHz). Also the counting test on a correct core, on a core with an injected `inc` fault (must report failure), and on the correct core again |
| `tb_cib`           | register writes and reads with random MAC wait states, aborting with stop, frame-to-RAM layout, three cycles per frame word, test start four cycles after the interrupt, hold-off while bit 6 is high, end on bit 6 |
| `tb_mem_ctrl`      | selection at the map boundaries and at random, with no clock between address and instruction |
| `tb_prog_rom`      | decodes the PROM image on its own and checks the register writes it performs, the handler, the jump window and the chip select |
| `tb_test_ram`      | full write/read-back, and a word readable the cycle after its write |

`tb/avr_core_model.sv` and `tb/eth_mac_model.sv` are behavioural models for
simulation only. The core model runs only the instructions that the PROM and
the example test use (ldi, mov, andi, ori, cpi, inc, dec, in, out, rjmp, jmp,
breq, brne, sei, nop). It keeps only the Z flag and has no stack. It runs one
word per clock. The MAC model has one receive descriptor and filters on
address and length.

The workload testbench takes a few seconds; the others take well under one.

## Size

Coarse synthesis of `avr_test_top`, before mapping to a technology, gives:

* 137 flip-flops and about 150 word-level cells, nearly all in `cib`;
* an 8 Kbit RAM (512 × 16);
* a 16 Kbit PROM (1024 × 16).

36 of the top's output bits are constant. They are the register bus byte
selects (always all four) and the frame-store read data (always zero).

## Departures, assumptions and limits

* The method defines the port roles, the port A bit positions, the 4+4 byte
  split, the RAM/PROM address map, the header location, FFh on port D, and
  bit 6 as the end of a test. The rest is this design's own choice: the
  port-B write strobe, byte order, the read-data path, the bus protocol, the
  byte count in word 7, the post-test handler and its jump window, and the
  depth of the PROM (1024 words).
* The counting test in its original form ends with `ldi r19,$20 / out PORTA,r19`.
  That sets only the status bit, which would leave the core in the RAM. Here
  it is followed by `ldi r19,$60 / out PORTA,r19`, so that the test ends by
  setting bit 6 as the method requires. These two extra words also account for
  the frame's 41-byte payload.
* The method counts the memory multiplexer as part of the control and
  interface block. Here it is the separate module `mem_ctrl`, fed by the CIB's
  `test_active`.
* Both memories read combinationally. This is what makes "no added delay"
  true, but on an FPGA it costs distributed RAM or LUTs rather than block RAM.
  For synchronous block RAM, a fetch pipeline stage would have to be added in
  the core.
* The circuit handles one receive descriptor and one frame at a time. A frame
  that arrives during a test is not seen, because the PROM re-arms the
  descriptor only after the test.
* The status LED is simply port A bit 5. The end bit (bit 6) is high only until
  the handler clears it.
* There is no transmit path. Results are seen on the port pins, not sent back
  over Ethernet.
* With the MAC and core models, the whole circuit is simulated only at its
  default sizes. It has not been run against a real AVR core or MAC, nor in
  hardware.
