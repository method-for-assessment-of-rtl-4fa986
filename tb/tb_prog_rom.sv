// Testbench of the PROM.  The expected contents are not taken from the
// package that builds the image; instead the testbench reads the PROM word
// by word and checks:
//   * the reset vector is "jmp 0200h" (940Ch 0200h);
//   * every word from 0002h to 01FFh is a relative jump, and all of them
//     land on the same handler, which starts with "in r21, PORTA" (B35Bh);
//   * decoding the start-up code from 0200h (ldi/mov/ori/in/out/nop) and
//     following the control-port protocol on port A/B gives exactly the
//     register writes below and one read of MODER, followed by a compare of
//     the read-back byte with 01h, then sei;
//   * the handler clears the receive interrupt and re-arms the descriptor;
//   * with the chip select low, and beyond the last word, the output is 0.
module tb_prog_rom;
  logic [15:0] addr, data;
  logic        cs;
  int          checks = 0, failures = 0;

  prog_rom dut (.addr, .cs, .data);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // PROM contents as read through the ports, captured once at the start
  logic [15:0] img [1024];
  function automatic logic [15:0] rd(input int a);
    return img[a];
  endfunction

  // Walks the program from `start` and records each control-port operation
  // as {write, address, data}; stops at sei or after `limit` words.
  typedef struct {bit wr; logic [31:0] adr; logic [31:0] dat;} op_t;

  task automatic walk(input int start, input int limit, output op_t ops[$], output int stop_pc);
    logic [7:0]  r [32];
    logic [7:0]  pa;
    logic [15:0] w;
    int          nb;
    bit          in_op;
    op_t         cur;
    ops.delete();
    in_op = 0; nb = 0; pa = 8'h00;
    foreach (r[i]) r[i] = 8'h00;
    for (int pc = start; pc < start + limit; pc++) begin
      w = rd(pc);
      stop_pc = pc;
      if (w == 16'h9478) break;                                  // sei
      casez (w)
        16'b1110_????_????_????: r[16 + w[7:4]] = {w[11:8], w[3:0]};          // ldi
        16'b0010_11??_????_????: r[w[8:4]] = r[{w[9], w[3:0]}];             // mov
        16'b0110_????_????_????: r[16 + w[7:4]] |= {w[11:8], w[3:0]};       // ori
        16'b0111_????_????_????: r[16 + w[7:4]] &= {w[11:8], w[3:0]};       // andi
        16'b1011_1???_????_????: begin                                      // out
          if ({w[10:9], w[3:0]} == 6'h1B) begin
            pa = r[w[8:4]];
            if (pa[7] && !pa[0]) begin
              in_op = 1; nb = 0; cur.wr = pa[1]; cur.adr = '0; cur.dat = '0;
            end
            if (pa[0] && in_op) begin
              ops.push_back(cur);
              in_op = 0;
            end
          end else if ({w[10:9], w[3:0]} == 6'h18 && in_op) begin
            if (nb < 4) cur.adr = {cur.adr[23:0], r[w[8:4]]};
            else if (cur.wr && nb < 8) cur.dat = {cur.dat[23:0], r[w[8:4]]};
            nb++;
          end
        end
        default: ;
      endcase
    end
  endtask

  initial begin
    op_t ops[$];
    int  target, handler, stop_pc;
    bit  same;
    logic [15:0] w;

    for (int a = 0; a < 1024; a++) begin
      addr = 16'(a);
      cs   = 1'b1;
      #1;
      img[a] = data;
    end
    check(rd(0) == 16'h940C && rd(1) == 16'h0200, "reset vector jmp 0200h");

    handler = -1; same = 1;
    for (int a = 2; a < 16'h0200; a++) begin
      w = rd(a);
      if (w[15:12] != 4'hC) same = 0;
      target = a + 1 + int'($signed(w[11:0]));
      if (handler < 0) handler = target;
      else if (target != handler) same = 0;
    end
    check(same, "0002h-01FFh all rjmp to one handler");
    check(handler >= 16'h0200 && rd(handler) == 16'hB35B, "handler starts with in r21, PORTA");

    walk(16'h0200, 400, ops, stop_pc);
    check(ops.size() == 8, $sformatf("start-up performs 8 port operations (%0d)", ops.size()));
    if (ops.size() == 8) begin
      check(ops[0].wr && ops[0].adr == 32'h18  && ops[0].dat == 32'h0020_0600, "PACKETLEN write");
      check(ops[1].wr && ops[1].adr == 32'h40  && ops[1].dat == 32'h203E_ABCD, "MAC_ADDR0 write");
      check(ops[2].wr && ops[2].adr == 32'h44  && ops[2].dat == 32'h0000_0013, "MAC_ADDR1 write");
      check(ops[3].wr && ops[3].adr == 32'h08  && ops[3].dat == 32'h0000_0004, "INT_MASK write");
      check(ops[4].wr && ops[4].adr == 32'h604 && ops[4].dat == 32'h0000_0000, "RX BD pointer write");
      check(ops[5].wr && ops[5].adr == 32'h600 && ops[5].dat == 32'h0000_E000, "RX BD arm write");
      check(ops[6].wr && ops[6].adr == 32'h00  && ops[6].dat == 32'h0001_A401, "MODER write");
      check(!ops[7].wr && ops[7].adr == 32'h00, "MODER read-back");
    end
    check(rd(stop_pc - 2) == 16'h3021, "read-back compared with 01h (cpi r18, 01h)");
    check(rd(stop_pc - 1) == 16'hF401 + 16'((rd(stop_pc - 1) & 16'h03F8)), "brne after compare");

    walk(handler, 100, ops, stop_pc);
    check(ops.size() == 2, "handler performs 2 port operations");
    if (ops.size() == 2) begin
      check(ops[0].wr && ops[0].adr == 32'h04 && ops[0].dat == 32'h4, "handler clears RXB");
      check(ops[1].wr && ops[1].adr == 32'h600 && ops[1].dat == 32'hE000, "handler re-arms BD");
    end

    addr = 16'h0000; cs = 1'b0; #1;
    check(data == 16'h0000, "chip select low gives 0000h");
    addr = 16'h0210; #1;
    check(data == 16'h0000, "chip select low gives 0000h (main program)");
    addr = 16'h0400; cs = 1'b1; #1;
    check(data == 16'h0000, "beyond the PROM reads 0000h");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
