// Testbench of the test-code RAM: writes a pseudo-random pattern to every
// word, reads it back through the combinational read port (the data must be
// there in the same cycle as the address), then overwrites a few words and
// checks that neighbours are untouched and that a written word is readable
// in the cycle right after the write.
module tb_test_ram;
  localparam int unsigned WORDS = 512;
  localparam int unsigned AW    = 9;

  logic          clk = 1'b0;
  logic          we;
  logic [AW-1:0] waddr, raddr;
  logic [15:0]   wdata, rdata;
  logic [15:0]   ref_mem [WORDS];
  int            checks = 0, failures = 0;

  always #5 clk = ~clk;

  test_ram #(.WORDS(WORDS), .WIDTH(16)) dut (.clk, .we, .waddr, .wdata, .raddr, .rdata);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [15:0] pattern(input int i);
    return 16'((i * 40503 + 12345) ^ (i << 7));
  endfunction

  initial begin
    we = 1'b0; waddr = '0; wdata = '0; raddr = '0;
    for (int i = 0; i < int'(WORDS); i++) begin
      @(negedge clk);
      we = 1'b1; waddr = AW'(i); wdata = pattern(i);
      ref_mem[i] = pattern(i);
    end
    @(negedge clk);
    we = 1'b0;
    for (int i = WORDS - 1; i >= 0; i--) begin
      raddr = AW'(i);
      #1;
      checks++;
      if (rdata !== ref_mem[i]) begin
        failures++;
        $display("FAIL: word %0d read %h expected %h", i, rdata, ref_mem[i]);
      end
    end
    for (int n = 0; n < 64; n++) begin
      int a;
      a = $urandom_range(WORDS - 1);
      @(negedge clk);
      we = 1'b1; waddr = AW'(a); wdata = 16'($urandom); ref_mem[a] = wdata;
      raddr = AW'(a);
      @(negedge clk);
      we = 1'b0;
      checks++;
      if (rdata !== ref_mem[a]) begin
        failures++;
        $display("FAIL: word %0d after write read %h expected %h", a, rdata, ref_mem[a]);
      end
      raddr = AW'((a + 1) % WORDS);
      #1;
      checks++;
      if (rdata !== ref_mem[(a + 1) % WORDS]) begin
        failures++;
        $display("FAIL: neighbour of %0d disturbed", a);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
