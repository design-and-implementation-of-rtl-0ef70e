// tb_nc_top: end-to-end test of the network controller against a
// behavioural W3100A.
//
// Channels 0 and 2 run UDP, channel 1 is a passive (listening) TCP channel
// and channel 3, the reconfigurable one, starts as an active TCP channel and
// is swapped to UDP with a larger MSS (1024) and back. The test drives the
// application FIFOs with random bytes and plays the remote peer through the
// model's tasks, then checks that every byte handed to a transmit FIFO
// leaves through the chip in order, that every byte the peer delivers on an
// open direction arrives in the right receive FIFO in order, the register
// set-up written at initialisation, the connection and disconnection
// sequences, the measurement counter and the bus timing. It counts each
// mechanism the controller has (buffer full, send wait, send, burst limit,
// receive stall, receive, open, connect timeout, connect reset, active
// close, passive close, half close, FIN Wait, disconnect timeout,
// reconfiguration) and fails if any never happened. Timeouts and the FIFO
// depth are reduced to keep the run short; everything else is at its
// default.
module tb_nc_top;
  import nc_pkg::*;

  localparam int unsigned TO = 4000;
  localparam int unsigned MEAS = 3000;

  logic clk = 1'b0;
  logic rst = 1'b1;
  always #10 clk = ~clk;

  logic        w3_rst, w3_int_n, w3_data_oe, w3_cs_n, w3_rd_n, w3_wr_n;
  logic [14:0] w3_addr;
  logic [7:0]  w3_data_o, w3_data_i;
  logic [3:0]  tx_wr = '0, tx_full, rx_rd, rx_empty;
  logic [7:0]  tx_din [4];
  logic [7:0]  rx_dout [4];
  logic [3:0]  open_req = '0, close_req = '0;
  logic        rp_busy = 1'b0, rp_variant = 1'b0;
  logic        init_done, meas_valid;
  logic [3:0]  ch_is_tcp, tx_up, rx_up;
  logic [15:0] rx_dropped, events;
  logic [31:0] timestamp, meas_clocks, meas_bytes;

  nc_top #(
    .CH_TCP(4'b1010), .CH_ACTIVE(4'b1101), .ALT_MSS(16'd1024),
    .FIFO_DEPTH(64), .TCP_TIMEOUT(TO), .RETRY_GAP(1000), .MEAS_IDLE(MEAS)
  ) dut (.*);

  w3100a_model #(.SEND_DELAY(300)) model (
    .clk, .rst_pin(w3_rst), .addr(w3_addr), .din(w3_data_o), .din_oe(w3_data_oe),
    .dout(w3_data_i), .cs_n(w3_cs_n), .rd_n(w3_rd_n), .wr_n(w3_wr_n), .int_n(w3_int_n)
  );

  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s (t=%0t)", what, $time);
    end
  endtask

  // ---- event counters ----------------------------------------------------
  int ev_cnt [15];
  string ev_name [15] = '{"buffer full", "send wait", "send", "burst limit", "receive stall",
                          "receive", "open", "connect timeout", "connect reset", "active close",
                          "passive close", "half close", "FIN wait", "disconnect timeout",
                          "reconfiguration"};
  initial foreach (ev_cnt[i]) ev_cnt[i] = 0;
  always @(posedge clk) if (!rst) for (int i = 0; i < 15; i++) if (events[i]) ev_cnt[i]++;

  // ---- application side: transmit feeders, receive drains ----------------
  byte tx_src [4][$];
  byte tx_exp [4][$];
  byte rx_exp [4][$];
  logic [3:0] hold = '0;
  int rx_got [4];
  int rx_err = 0;

  initial for (int c = 0; c < 4; c++) begin tx_din[c] = 8'h00; rx_got[c] = 0; end

  always @(negedge clk) begin
    for (int c = 0; c < 4; c++) begin
      if (tx_src[c].size() > 0 && !tx_full[c]) begin
        tx_wr[c]  = 1'b1;
        tx_din[c] = tx_src[c].pop_front();
        tx_exp[c].push_back(byte'(tx_din[c]));
      end else begin
        tx_wr[c] = 1'b0;
      end
    end
  end

  assign rx_rd = rst ? 4'b0 : ~rx_empty & ~hold;

  always @(posedge clk) begin
    for (int c = 0; c < 4; c++) begin
      if (rx_rd[c]) begin
        rx_got[c]++;
        if (rx_exp[c].size() == 0 || byte'(rx_dout[c]) != rx_exp[c][0]) rx_err++;
        if (rx_exp[c].size() > 0) void'(rx_exp[c].pop_front());
      end
    end
  end

  task automatic push_tx(input int c, input int n);
    for (int i = 0; i < n; i++) tx_src[c].push_back(byte'($urandom));
  endtask

  // peer data for c; expect it in the receive FIFO when expect_it is set
  task automatic peer_rx(input int c, input int n, input bit expect_it);
    byte d [$];
    int  k;
    for (int i = 0; i < n; i++) d.push_back(byte'($urandom));
    @(negedge clk);
    k = model.peer_data(c, d);
    check(k == n, $sformatf("peer data for channel %0d fits the chip buffer", c));
    if (expect_it) foreach (d[i]) rx_exp[c].push_back(d[i]);
  endtask

  task automatic wait_cycles(input int n);
    repeat (n) @(posedge clk);
  endtask

  // wait until everything queued for c has left the chip, then compare
  task automatic check_sent(input int c, input int limit);
    int t = 0;
    while ((tx_src[c].size() != 0 || model.sent_q[c].size() < tx_exp[c].size()) && t < limit) begin
      @(posedge clk); t++;
    end
    check(model.sent_q[c].size() == tx_exp[c].size(),
          $sformatf("channel %0d sent %0d bytes, expected %0d", c, model.sent_q[c].size(), tx_exp[c].size()));
    while (model.sent_q[c].size() > 0 && tx_exp[c].size() > 0) begin
      if (model.sent_q[c].pop_front() != tx_exp[c].pop_front()) begin
        check(1'b0, $sformatf("channel %0d transmit data order", c));
        break;
      end
    end
    model.sent_q[c].delete();
    tx_exp[c].delete();
  endtask

  task automatic check_received(input int c, input int limit);
    int t = 0;
    while (rx_exp[c].size() != 0 && t < limit) begin @(posedge clk); t++; end
    check(rx_exp[c].size() == 0, $sformatf("channel %0d received everything (%0d left)", c, rx_exp[c].size()));
    check(rx_err == 0, "received bytes in order");
  endtask

  task automatic wait_ssr(input int c, input logic [7:0] s, input int limit);
    int t = 0;
    while (model.ssr[c] != s && t < limit) begin @(posedge clk); t++; end
    check(model.ssr[c] == s, $sformatf("channel %0d socket state %02h (is %02h)", c, s, model.ssr[c]));
  endtask

  task automatic wait_bit(ref logic [3:0] v, input int c, input logic val, input int limit, input string what);
    int t = 0;
    while (v[c] != val && t < limit) begin @(posedge clk); t++; end
    check(v[c] == val, what);
  endtask

  // ---- watchdog ----------------------------------------------------------
  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- the test -------------------------------------------------------------
  initial begin
    int t0, t1;
    wait_cycles(5);
    rst = 1'b0;

    // initialisation
    t0 = 0;
    while (!init_done && t0 < 20000) begin @(posedge clk); t0++; end
    check(init_done, "initialisation completes");
    check({model.mem[A_SIPR], model.mem[A_SIPR+1], model.mem[A_SIPR+2], model.mem[A_SIPR+3]} == {8'd10, 8'd0, 8'd0, 8'd91},
          "source IP 10.0.0.91");
    check({model.mem[A_SHAR], model.mem[A_SHAR+5]} == {8'h00, 8'h01}, "MAC address");
    check(model.mem[A_IMR] == 8'hFF, "interrupt mask");
    check({model.mem[chreg_addr(0, O_SPORT)], model.mem[chreg_addr(0, O_SPORT+1)]} == 16'd10001, "channel 0 source port");
    check({model.mem[chreg_addr(0, O_DPORT)], model.mem[chreg_addr(0, O_DPORT+1)]} == 16'd10000, "channel 0 destination port");
    check({model.mem[chreg_addr(3, O_MSSR)], model.mem[chreg_addr(3, O_MSSR+1)]} == 16'd128, "channel 3 MSS");
    check(model.ssr[0] == SS_UDP && model.ssr[2] == SS_UDP, "UDP sockets opened");
    check(ch_is_tcp == 4'b1010, "channel modes");

    // UDP transmission: a long stream on 0 (burst limit, full chip buffer), short on 2
    push_tx(0, 3000);
    push_tx(2, 300);
    check_sent(0, 200000);
    check_sent(2, 20000);

    // UDP reception
    peer_rx(0, 200, 1);
    peer_rx(2, 100, 1);
    check_received(0, 20000);
    check_received(2, 20000);

    // receive FIFO full: the receiver must wait
    hold[0] = 1'b1;
    peer_rx(0, 300, 1);
    wait_cycles(3000);
    check(rx_exp[0].size() > 0, "held receive FIFO stops reception");
    hold[0] = 1'b0;
    check_received(0, 20000);

    // throughput counter: one burst after a quiet period
    wait_cycles(MEAS + 100);
    peer_rx(2, 100, 1);
    t0 = 0;
    while (!meas_valid && t0 < 20000) begin @(posedge clk); t0++; end
    check(meas_valid, "measurement result");
    check(meas_bytes == 100, $sformatf("measured bytes %0d", meas_bytes));
    check(meas_clocks >= 99 * 9, $sformatf("measured time %0d clocks covers 99 reads of 9 clocks", meas_clocks));
    check_received(2, 1000);

    // passive TCP on channel 1: a SYN, then the final ACK is late (timeout), then all goes well
    open_req[1] = 1'b1;
    wait_ssr(1, SS_SYN_WAIT, 20000);
    @(negedge clk) model.peer_syn(1);
    wait_cycles(TO + 3000);
    wait_ssr(1, SS_SYN_WAIT, 20000);                      // listening again
    @(negedge clk) model.peer_syn(1);
    wait_cycles(200);
    @(negedge clk) model.peer_ack(1);
    wait_bit(tx_up, 1, 1'b1, 20000, "passive open reaches established");
    push_tx(1, 200);
    peer_rx(1, 150, 1);
    check_sent(1, 40000);
    check_received(1, 20000);

    // passive close while data is still queued: half close
    push_tx(1, 1500);
    wait_cycles(100);
    @(negedge clk) model.peer_fin(1);
    wait_bit(rx_up, 1, 1'b0, 5000, "half close stops reception");
    check(tx_up[1], "half close keeps transmission");
    peer_rx(1, 40, 0);                                     // ignored while half closed
    check_sent(1, 100000);
    wait_ssr(1, SS_LAST_ACK, 20000);
    @(negedge clk) model.peer_ack(1);
    wait_bit(tx_up, 1, 1'b0, 20000, "passive close ends the connection");
    wait_ssr(1, SS_SYN_WAIT, 30000);                       // listening for the next one
    open_req[1] = 1'b0;

    // active TCP on channel 3: no ARP reply (timeout), then a reset, then success
    model.peer_up[3] = 1'b0;
    open_req[3] = 1'b1;
    wait_ssr(3, SS_ARP_WAIT, 20000);
    wait_ssr(3, SS_CLOSED, TO + 5000);
    model.peer_up[3] = 1'b1;
    model.peer_rst[3] = 1'b1;
    wait_ssr(3, SS_SYNACK_WAIT, 20000);
    wait_ssr(3, SS_CLOSED, 2000);
    model.peer_rst[3] = 1'b0;
    wait_bit(tx_up, 3, 1'b1, 30000, "active open reaches established");
    push_tx(3, 100);
    peer_rx(3, 100, 1);
    check_sent(3, 40000);
    check_received(3, 20000);

    // active close, peer only acknowledges: FIN Wait, reception goes on
    close_req[3] = 1'b1;
    wait_ssr(3, SS_FINACK_WAIT, 20000);
    wait_cycles(20);
    check(!tx_up[3] && rx_up[3], "after FIN: transmit stops, receive runs");
    @(negedge clk) model.peer_ack(3);
    wait_cycles(2000);
    peer_rx(3, 60, 1);
    check_received(3, 20000);
    @(negedge clk) model.peer_fin(3);
    wait_bit(rx_up, 3, 1'b0, 20000, "active close ends the connection");
    open_req[3] = 1'b0;
    wait_cycles(200);
    close_req[3] = 1'b0;

    // active close that is never answered: disconnect timeout
    open_req[3] = 1'b1;
    wait_bit(tx_up, 3, 1'b1, 30000, "second active open");
    open_req[3] = 1'b0;
    close_req[3] = 1'b1;
    wait_ssr(3, SS_FINACK_WAIT, 20000);
    wait_bit(rx_up, 3, 1'b0, TO + 5000, "unanswered close times out");
    wait_cycles(200);
    close_req[3] = 1'b0;

    // partial reconfiguration of channel 3 to UDP with MSS 1024
    t0 = ev_cnt[14];
    rp_variant = 1'b1;
    rp_busy = 1'b1;
    wait_cycles(20);
    check(!tx_up[3] && !rx_up[3], "channel isolated while reconfigured");
    push_tx(3, 50);                                        // waits in the FIFO
    wait_cycles(500);
    check(model.sent_q[3].size() == 0, "nothing sent while reconfigured");
    rp_busy = 1'b0;
    wait_bit(tx_up, 3, 1'b1, 20000, "channel back after reconfiguration");
    wait_cycles(5);
    check(ev_cnt[14] == t0 + 1, "one reconfiguration");
    check(ch_is_tcp[3] == 1'b0, "channel 3 now UDP");
    check(model.ssr[3] == SS_UDP, "chip socket 3 opened as UDP");
    check({model.mem[chreg_addr(3, O_MSSR)], model.mem[chreg_addr(3, O_MSSR+1)]} == 16'd1024, "channel 3 MSS 1024");
    check_sent(3, 20000);
    peer_rx(3, 80, 1);
    check_received(3, 20000);

    // and back to TCP
    rp_variant = 1'b0;
    rp_busy = 1'b1;
    wait_cycles(100);
    rp_busy = 1'b0;
    t1 = 0;
    while (!(ch_is_tcp[3] && model.ssr[3] == SS_INIT) && t1 < 20000) begin @(posedge clk); t1++; end
    check(ch_is_tcp[3] && model.ssr[3] == SS_INIT, "channel 3 back to TCP");

    // UDP channels untouched by all this
    push_tx(0, 64);
    check_sent(0, 20000);

    check(model.timing_err == 0, $sformatf("bus timing violations: %0d", model.timing_err));
    check(rx_err == 0, "no receive data errors");
    for (int i = 0; i < 15; i++) begin
      $display("  %-20s %0d", ev_name[i], ev_cnt[i]);
      check(ev_cnt[i] > 0, $sformatf("mechanism '%s' happened", ev_name[i]));
    end
    $display("bus reads %0d writes %0d, time %0t", model.reads, model.writes, $time);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
