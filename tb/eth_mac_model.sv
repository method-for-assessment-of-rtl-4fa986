// Behavioural model of the Ethernet MAC, for simulation only.
//
// Models the part of an open-source Ethernet MAC core that the test circuit
// uses: a 32-bit register slave (MODER, INT_SOURCE, INT_MASK, PACKETLEN,
// station address, one receive buffer descriptor), a frame-store master that
// writes a received frame as big-endian 32-bit words at the descriptor's
// pointer, and an interrupt output.  The testbench hands it a frame with the
// task receive(); the frame is accepted when reception is enabled, the
// descriptor is empty, the destination is the station address, broadcast or
// promiscuous mode is on, and the length passes the PACKETLEN limits
// (frames below the minimum pass when RECSMALL is set).  An accepted frame is
// written out, its length goes into the descriptor, the descriptor is marked
// full and INT_SOURCE.RXB is set.  int_o = |(INT_SOURCE & INT_MASK);
// INT_SOURCE bits are cleared by writing ones.  Register accesses are
// acknowledged one cycle after the request.
module eth_mac_model
  import avr_test_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  wb_req_t reg_req,
  output wb_rsp_t reg_rsp,
  output wb_req_t dma_req,
  input  wb_rsp_t dma_rsp,
  output logic    int_o
);

  logic [31:0] moder, int_source, int_mask, packetlen, addr0, addr1, bd_ctrl, bd_ptr;
  int n_reg_wr, n_reg_rd, n_rx_ok, n_rx_drop;

  // completion of a frame, from receive() to the register process
  logic        rx_done_tgl, rx_done_q;
  logic [15:0] rx_done_len;

  function automatic logic [31:0] reg_rd(input logic [31:0] a);
    case (a)
      MAC_MODER:      return moder;
      MAC_INT_SOURCE: return int_source;
      MAC_INT_MASK:   return int_mask;
      MAC_PACKETLEN:  return packetlen;
      MAC_ADDR0:      return addr0;
      MAC_ADDR1:      return addr1;
      MAC_RXBD0_CTRL: return bd_ctrl;
      MAC_RXBD0_PTR:  return bd_ptr;
      default:        return 32'h0;
    endcase
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      moder      <= 32'h0000_A000;
      int_source <= '0;
      int_mask   <= '0;
      packetlen  <= 32'h0040_0600;
      addr0      <= '0;
      addr1      <= '0;
      bd_ctrl    <= '0;
      bd_ptr     <= '0;
      reg_rsp    <= '0;
      rx_done_q  <= 1'b0;
      n_reg_wr   <= 0;
      n_reg_rd   <= 0;
    end else begin
      reg_rsp.ack <= 1'b0;
      if (reg_req.cyc && reg_req.stb && !reg_rsp.ack) begin
        reg_rsp.ack <= 1'b1;
        reg_rsp.dat <= reg_rd(reg_req.adr);
        if (reg_req.we) begin
          n_reg_wr <= n_reg_wr + 1;
          case (reg_req.adr)
            MAC_MODER:      moder      <= reg_req.dat;
            MAC_INT_SOURCE: int_source <= int_source & ~reg_req.dat;
            MAC_INT_MASK:   int_mask   <= reg_req.dat;
            MAC_PACKETLEN:  packetlen  <= reg_req.dat;
            MAC_ADDR0:      addr0      <= reg_req.dat;
            MAC_ADDR1:      addr1      <= reg_req.dat;
            MAC_RXBD0_CTRL: bd_ctrl    <= reg_req.dat;
            MAC_RXBD0_PTR:  bd_ptr     <= reg_req.dat;
            default: ;
          endcase
        end else begin
          n_reg_rd <= n_reg_rd + 1;
        end
      end
      rx_done_q <= rx_done_tgl;
      if (rx_done_q != rx_done_tgl) begin
        int_source[2]   <= 1'b1;
        bd_ctrl[31:16]  <= rx_done_len;
        bd_ctrl[15]     <= 1'b0;
      end
    end
  end

  assign int_o = |(int_source & int_mask);

  initial begin
    dma_req     = '0;
    rx_done_tgl = 1'b0;
    rx_done_len = '0;
    n_rx_ok     = 0;
    n_rx_drop   = 0;
  end

  // Deliver one frame (destination address first, no FCS).  ok tells whether
  // the MAC accepted it.
  task automatic receive(input logic [7:0] frame [], output bit ok);
    int len, nw;
    logic [47:0] dst;
    logic [31:0] w;
    len = frame.size();
    dst = {frame[0], frame[1], frame[2], frame[3], frame[4], frame[5]};
    ok  = moder[0] && bd_ctrl[15]
          && (dst == {addr1[15:0], addr0} || dst == 48'hFFFF_FFFF_FFFF || moder[5])
          && (len >= int'(packetlen[31:16]) || moder[16])
          && (len <= int'(packetlen[15:0]));
    if (!ok) begin
      n_rx_drop++;
      return;
    end
    nw = (len + 3) / 4;
    for (int k = 0; k < nw; k++) begin
      w = '0;
      for (int b = 0; b < 4; b++)
        if (4*k + b < len) w[31-8*b -: 8] = frame[4*k + b];
      @(posedge clk);
      dma_req <= '{cyc: 1'b1, stb: 1'b1, we: 1'b1, adr: bd_ptr + 32'(4*k), dat: w, sel: 4'hF};
      do @(posedge clk); while (!dma_rsp.ack);
      dma_req <= '0;
    end
    @(posedge clk);
    rx_done_len <= 16'(len);
    rx_done_tgl <= ~rx_done_tgl;
    n_rx_ok++;
  endtask

endmodule
