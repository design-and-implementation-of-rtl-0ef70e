// tb_nc_top_full: one complete run of the controller with every parameter
// at its default, against a behavioural W3100A.
//
// Defaults: channels 0-2 UDP, channel 3 an active TCP channel, 256-byte
// FIFOs, 2048-byte bursts, 1 ms TCP timeouts and a 1 s (50 million clock)
// idle time for the throughput counter. The run initialises the chip,
// streams 5000 random bytes out of channel 0 and 1000 out of channel 1,
// delivers 1500 bytes from the peer on channel 2, opens the TCP connection
// on channel 3, exchanges data on it and closes it actively, and then waits
// out the full second of idle time for the throughput counter's result,
// checking every byte, the register set-up and the bus timing.
module tb_nc_top_full;
  import nc_pkg::*;

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

  nc_top dut (.*);

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
    repeat (60_000_000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int t0;
    wait_cycles(5);
    rst = 1'b0;
    t0 = 0;
    while (!init_done && t0 < 20000) begin @(posedge clk); t0++; end
    check(init_done, "initialisation completes");
    check({model.mem[A_SIPR], model.mem[A_SIPR+1], model.mem[A_SIPR+2], model.mem[A_SIPR+3]} == {8'd10, 8'd0, 8'd0, 8'd91},
          "source IP 10.0.0.91");
    check(model.ssr[0] == SS_UDP && model.ssr[1] == SS_UDP && model.ssr[2] == SS_UDP, "UDP sockets 0-2 opened");
    check(model.ssr[3] == SS_INIT, "TCP socket 3 initialised");
    check({model.mem[chreg_addr(1, O_SPORT)], model.mem[chreg_addr(1, O_SPORT+1)]} == 16'd10002, "channel 1 source port");

    // UDP traffic
    push_tx(0, 5000);
    push_tx(1, 1000);
    peer_rx(2, 1500, 1);
    check_sent(0, 400000);
    check_sent(1, 100000);
    check_received(2, 100000);
    check(ev_cnt[3] > 0, "a 2048-byte burst was cut");

    // TCP on channel 3
    open_req[3] = 1'b1;
    wait_bit(tx_up, 3, 1'b1, 100000, "TCP connection established");
    push_tx(3, 700);
    peer_rx(3, 300, 1);
    check_sent(3, 100000);
    check_received(3, 100000);
    close_req[3] = 1'b1;
    wait_ssr(3, SS_FINACK_WAIT, 20000);
    @(negedge clk) model.peer_finack(3);
    wait_bit(rx_up, 3, 1'b0, 20000, "TCP connection closed");
    open_req[3] = 1'b0;
    wait_cycles(100);
    close_req[3] = 1'b0;

    // the throughput counter reports after one second without data
    t0 = 0;
    while (!meas_valid && t0 < 51_000_000) begin @(posedge clk); t0++; end
    check(meas_valid, "throughput measurement reported");
    check(meas_bytes == 1800, $sformatf("measured bytes %0d (all 1800 received bytes, no second-long gap)", meas_bytes));
    check(meas_clocks >= 1799 * 9, $sformatf("measured %0d clocks", meas_clocks));

    check(model.timing_err == 0, "bus timing");
    check(rx_err == 0, "no receive data errors");
    $display("bus reads %0d writes %0d, time %0t", model.reads, model.writes, $time);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
