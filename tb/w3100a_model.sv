// w3100a_model: behavioural model of the W3100A's MCU side, for testbenches.
//
// Not synthesisable and not a model of the real chip's internals: it gives
// the controller something to talk to. It has the byte memory map used by
// the controller (control registers, pointer registers with shadow
// registers, 8 KB transmit and 8 KB receive buffers split 2 KB per channel),
// decodes the clocked-mode bus (a write is taken when WR rises, a read
// drives the data bus while RD is low; an undriven bus reads 0, like the
// pull-downs on the board) and checks the bus timing rules in clocks:
// CS low for at least 5 clocks (100 ns), RD/WR only inside CS and starting
// at least one clock after it. The model does nothing until it has seen
// its reset pin high once, as the chip needs a reset after power-up.
//
// Commands: system init (ISR0 becomes 0x01 after a while), socket init
// (pointers to 0, SSR = INIT or UDP), connect (ARP Wait -> SYN ACK Wait ->
// Established, or stuck in ARP Wait when peer_up is 0, or Closed when
// peer_rst is 1), listen (SYN Wait), close (FIN ACK Wait from Established,
// Last ACK after a peer FIN, else Closed), send (ISR send bit set for
// SEND_DELAY clocks, then the bytes between TRPR and TWPR are "sent": pushed
// to sent_q and TAPR/TRPR catch up) and recv (re-raises the interrupt if
// unread data remains). Tasks let a testbench play the peer: deliver data,
// send SYN / ACK / FIN / FIN ACK / RST.
module w3100a_model
  import nc_pkg::*;
#(
  parameter int unsigned SEND_DELAY = 40,
  parameter int unsigned ARP_DELAY  = 30,
  parameter int unsigned SYN_DELAY  = 30
) (
  input  logic        clk,
  input  logic        rst_pin,
  input  logic [14:0] addr,
  input  logic [7:0]  din,
  input  logic        din_oe,
  output logic [7:0]  dout,
  input  logic        cs_n,
  input  logic        rd_n,
  input  logic        wr_n,
  output logic        int_n
);

  logic [7:0]  mem [32768];
  logic [7:0]  isr [4];
  logic [7:0]  ir;
  logic [7:0]  ssr [4];
  logic [31:0] ptr [4][5];       // RW, RR, TA, TW, TR
  logic [31:0] latch [4][5];
  int          send_t [4];
  int          conn_t [4];
  int          init_t;
  bit          peer_up  [4];
  bit          peer_rst [4];
  byte         sent_q   [4][$];
  int          timing_err;
  int          reads, writes;
  bit          powered;          // a reset has been seen since power-up

  // bus timing bookkeeping
  int cs_len, strobe_len;
  logic cs_q, rd_q, wr_q;

  initial begin
    for (int i = 0; i < 32768; i++) mem[i] = 8'h00;
    for (int c = 0; c < 4; c++) begin
      isr[c] = 0; ssr[c] = SS_CLOSED; send_t[c] = -1; conn_t[c] = -1;
      peer_up[c] = 1; peer_rst[c] = 0;
      for (int p = 0; p < 5; p++) begin ptr[c][p] = 0; latch[c][p] = 0; end
    end
    powered = 0;
    ir = 0; init_t = -1; timing_err = 0; reads = 0; writes = 0;
    cs_len = 0; strobe_len = 0; cs_q = 1; rd_q = 1; wr_q = 1;
  end

  assign int_n = !(|(ir[3:0] & mem[A_IMR][3:0]));

  function automatic void bad(input string what);
    timing_err++;
    $display("w3100a_model: %s at %0t", what, $time);
  endfunction

  function automatic logic [7:0] read_byte(input int a);
    int off;
    if (a >= A_ISR_BASE && a < A_ISR_BASE + 4) return isr[a - A_ISR_BASE];
    if (a == A_IR) return ir;
    if (a >= A_CH_BASE && a < A_CH_BASE + 4 * CH_STRIDE && (a - A_CH_BASE) % CH_STRIDE == O_SSR)
      return ssr[(a - A_CH_BASE) / CH_STRIDE];
    if (a >= A_PTR_BASE && a < A_PTR_BASE + 4 * PTR_STRIDE) begin
      off = (a - A_PTR_BASE) % PTR_STRIDE;
      if (off < 20) return latch[(a - A_PTR_BASE) / PTR_STRIDE][off / 4][31 - 8 * (off % 4) -: 8];
      return 8'h00;
    end
    return mem[a];
  endfunction

  assign dout = (!cs_n && !rd_n) ? read_byte(int'(addr)) : 8'h00;

  task automatic after_read(input int a);
    int c, off;
    reads++;
    if (a >= A_ISR_BASE && a < A_ISR_BASE + 4) begin
      c = a - A_ISR_BASE;
      isr[c] = isr[c] & ~ISR_RECV;
      ir[c]  = 1'b0;
    end
    if (a >= A_PTR_BASE && a < A_PTR_BASE + 4 * PTR_STRIDE) begin
      off = (a - A_PTR_BASE) % PTR_STRIDE;
      c   = (a - A_PTR_BASE) / PTR_STRIDE;
      if (off >= O_SHADOW && off < O_SHADOW + 5) latch[c][off - O_SHADOW] = ptr[c][off - O_SHADOW];
    end
  endtask

  task automatic do_write(input int a, input logic [7:0] d);
    int c, off;
    writes++;
    if (a < A_CR_BASE + 4) begin
      c = a;
      if (d == CR_SYS_INIT && c == 0) init_t = 20;
      if (d == CR_SOCK_INIT) begin
        for (int p = 0; p < 5; p++) ptr[c][p] = 0;
        ssr[c] = ((mem[chreg_addr(2'(c), O_SOPR)] & 8'h0F) == SOPR_UDP) ? SS_UDP : SS_INIT;
        isr[c] = 0; ir[c] = 0;
      end
      if (d == CR_CONNECT) begin ssr[c] = SS_ARP_WAIT; conn_t[c] = ARP_DELAY; end
      if (d == CR_LISTEN)  begin ssr[c] = SS_SYN_WAIT; conn_t[c] = -1; end
      if (d == CR_CLOSE) begin
        if (ssr[c] == SS_ESTABLISHED)      ssr[c] = SS_FINACK_WAIT;
        else if (ssr[c] == SS_PEER_FIN)    ssr[c] = SS_LAST_ACK;
        else if (ssr[c] == SS_FIN_WAIT)    ssr[c] = SS_FIN_WAIT;
        else begin ssr[c] = SS_CLOSED; conn_t[c] = -1; end
      end
      if (d == CR_SEND) begin
        if ((isr[c] & ISR_SEND) != 0) bad("send command while a send is pending");
        isr[c] = isr[c] | ISR_SEND;
        send_t[c] = SEND_DELAY;
      end
      if (d == CR_RECV) begin
        if (ptr[c][P_RW][10:0] != ptr[c][P_RR][10:0]) begin
          isr[c] = isr[c] | ISR_RECV; ir[c] = 1'b1;
        end
      end
      return;
    end
    if (a >= A_PTR_BASE && a < A_PTR_BASE + 4 * PTR_STRIDE) begin
      off = (a - A_PTR_BASE) % PTR_STRIDE;
      c   = (a - A_PTR_BASE) / PTR_STRIDE;
      if (off < 20) ptr[c][off / 4][31 - 8 * (off % 4) -: 8] = d;
      return;
    end
    mem[a] = d;
  endtask

  always @(posedge clk) begin
    if (rst_pin) begin
      for (int c = 0; c < 4; c++) begin
        isr[c] = 0; ssr[c] = SS_CLOSED; send_t[c] = -1; conn_t[c] = -1;
        for (int p = 0; p < 5; p++) ptr[c][p] = 0;
      end
      ir = 0; init_t = -1; powered = 1;
      cs_len = 0; strobe_len = 0; cs_q = 1; rd_q = 1; wr_q = 1;
    end else if (powered) begin
      // bus decoding and timing checks
      if (!cs_n) cs_len++;
      if (!rd_n || !wr_n) begin
        strobe_len++;
        if (cs_n) bad("RD/WR low while CS high");
        if (strobe_len == 1 && cs_len < 2) bad("RD/WR less than one clock after CS");
        if (!wr_n && !din_oe) bad("WR low with the data bus not driven");
      end
      if (!rd_n && !wr_n) bad("RD and WR low together");
      if (rd_q == 0 && rd_n == 1) begin after_read(int'(addr)); strobe_len = 0; end
      if (wr_q == 0 && wr_n == 1) begin do_write(int'(addr), din); strobe_len = 0; end
      if (cs_q == 0 && cs_n == 1) begin
        if (cs_len < 5) bad("CS low for less than 100 ns");
        if (!rd_q || !wr_q) bad("RD/WR still low when CS rises");
        cs_len = 0;
      end
      cs_q = cs_n; rd_q = rd_n; wr_q = wr_n;

      // chip activity
      if (init_t > 0) init_t--;
      else if (init_t == 0) begin isr[0] = ISR_INIT_OK; init_t = -1; end
      for (int c = 0; c < 4; c++) begin
        if (send_t[c] > 0) send_t[c]--;
        else if (send_t[c] == 0) begin
          while (ptr[c][P_TR] != ptr[c][P_TW]) begin
            sent_q[c].push_back(byte'(mem[A_TXBUF + c * 2048 + int'(ptr[c][P_TR][10:0])]));
            ptr[c][P_TR] = ptr[c][P_TR] + 1;
          end
          ptr[c][P_TA] = ptr[c][P_TR];
          isr[c] = isr[c] & ~ISR_SEND;
          send_t[c] = -1;
        end
        if (conn_t[c] > 0) conn_t[c]--;
        else if (conn_t[c] == 0) begin
          conn_t[c] = -1;
          if (ssr[c] == SS_ARP_WAIT && peer_up[c]) begin ssr[c] = SS_SYNACK_WAIT; conn_t[c] = SYN_DELAY; end
          else if (ssr[c] == SS_SYNACK_WAIT) ssr[c] = peer_rst[c] ? SS_CLOSED : SS_ESTABLISHED;
        end
      end
    end
  end

  // ---- peer side, for testbenches ------------------------------------------------
  // bytes that arrive for channel c; returns how many fitted
  function automatic int peer_data(input int c, input byte d [$]);
    int n = 0;
    int used;
    foreach (d[i]) begin
      used = int'(ptr[c][P_RW][10:0] - ptr[c][P_RR][10:0]) & 2047;
      if (used >= 2047) break;
      mem[A_RXBUF + c * 2048 + int'(ptr[c][P_RW][10:0])] = d[i];
      ptr[c][P_RW] = ptr[c][P_RW] + 1;
      n++;
    end
    if (n > 0) begin isr[c] = isr[c] | ISR_RECV; ir[c] = 1'b1; end
    return n;
  endfunction

  // a packet from the peer changes the socket state
  function automatic void peer_syn(input int c);     if (ssr[c] == SS_SYN_WAIT) ssr[c] = SS_ACK_WAIT; endfunction
  function automatic void peer_ack(input int c);
    if (ssr[c] == SS_ACK_WAIT) ssr[c] = SS_ESTABLISHED;
    else if (ssr[c] == SS_FINACK_WAIT) ssr[c] = SS_FIN_WAIT;
    else if (ssr[c] == SS_LAST_ACK) ssr[c] = SS_CLOSED;
  endfunction
  function automatic void peer_fin(input int c);
    if (ssr[c] == SS_ESTABLISHED) ssr[c] = SS_PEER_FIN;
    else if (ssr[c] == SS_FIN_WAIT) ssr[c] = SS_CLOSED;
  endfunction
  function automatic void peer_finack(input int c);  if (ssr[c] == SS_FINACK_WAIT) ssr[c] = SS_CLOSED; endfunction
  function automatic void peer_reset(input int c);   ssr[c] = SS_CLOSED; conn_t[c] = -1; endfunction

  function automatic logic [7:0] reg_byte(input int a); return mem[a]; endfunction

endmodule
