// tb_tcp_disconnect_fsm: checks the TCP connection-closing state machine.
//
// All four channels start established in a behavioural W3100A; the machine
// commands it through the bus cycle generator, with TIMEOUT reduced to 2000
// clocks. Five closings are played, each checked for the transmit and
// receive permissions on the way and for the closed pulse at the end:
//   0  active close, the peer answers FIN ACK at once            -> Closed
//   1  active close, the peer only ACKs (FIN Wait, still
//      receiving), its FIN comes later                           -> Closed
//   2  the peer's FIN while data is still to be sent: Half Closed
//      (still sending, not receiving), then FIN ACK, final ACK   -> Closed
//   3  the peer's FIN with nothing to send: ACK Wait, no final
//      ACK                                                       -> timeout
//   0  again: active close never answered                        -> timeout
module tb_tcp_disconnect_fsm;
  import nc_pkg::*;

  localparam int TO = 2000;
  logic clk = 1'b0;
  logic rst = 1'b1;
  always #10 clk = ~clk;

  logic [3:0] est = '0, close_req = '0, more_data = '0, tx_allow, rx_allow, closed;
  logic       ev_active_close, ev_passive_close, ev_half_closed, ev_fin_wait, ev_timeout;
  bus_req_t   m_req;
  bus_rsp_t   m_rsp;
  logic       data_oe, cs_n, rd_n, wr_n, int_n;
  logic [14:0] addr_o;
  logic [7:0] data_o, data_i;

  tcp_disconnect_fsm #(.TIMEOUT(TO)) dut (.clk, .rst, .enable(1'b1), .est, .close_req, .more_data,
    .tx_allow, .rx_allow, .closed, .m_req, .m_rsp, .ev_active_close, .ev_passive_close,
    .ev_half_closed, .ev_fin_wait, .ev_timeout);
  w3100a_bus_if u_bus (.clk, .rst, .req(m_req), .rsp(m_rsp), .busy(), .addr_o, .data_o, .data_oe,
                       .data_i, .cs_n, .rd_n, .wr_n);
  w3100a_model model (.clk, .rst_pin(rst), .addr(addr_o), .din(data_o), .din_oe(data_oe),
                      .dout(data_i), .cs_n, .rd_n, .wr_n, .int_n);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (t=%0t)", what, $time); end
  endtask

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int n_ac = 0, n_pc = 0, n_hc = 0, n_fw = 0, n_to = 0;
  int n_closed [4];
  initial foreach (n_closed[c]) n_closed[c] = 0;
  // the connect machine's part: a closed channel is no longer established
  always @(posedge clk) begin
    if (!rst && ev_active_close) n_ac++;
    if (!rst && ev_passive_close) n_pc++;
    if (!rst && ev_half_closed) n_hc++;
    if (!rst && ev_fin_wait) n_fw++;
    if (!rst && ev_timeout) n_to++;
    for (int c = 0; c < 4; c++) if (!rst && closed[c]) begin n_closed[c]++; est[c] <= 1'b0; end
  end

  task automatic wait_ssr(input int c, input logic [7:0] s, input int limit);
    int t = 0;
    while (model.ssr[c] != s && t < limit) begin @(posedge clk); t++; end
    check(model.ssr[c] == s, $sformatf("channel %0d reaches socket state %02h (is %02h)", c, s, model.ssr[c]));
  endtask

  task automatic wait_closed(input int c, input int n, input int limit);
    int t = 0;
    while (n_closed[c] < n && t < limit) begin @(posedge clk); t++; end
    check(n_closed[c] == n, $sformatf("channel %0d closed pulse", c));
    @(negedge clk);
    check(!tx_allow[c] && !rx_allow[c], "nothing allowed after closing");
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst = 1'b0;
    for (int c = 0; c < 4; c++) model.ssr[c] = SS_ESTABLISHED;
    est = 4'b1111;
    repeat (100) @(posedge clk);
    check(tx_allow == 4'b1111 && rx_allow == 4'b1111, "established: both directions");
    check(model.writes == 0, "no command while established");

    // 0: active close, FIN ACK
    close_req[0] = 1'b1;
    wait_ssr(0, SS_FINACK_WAIT, 1000);
    repeat (2) @(negedge clk);
    check(!tx_allow[0] && rx_allow[0], "FIN ACK Wait: receive only");
    @(negedge clk) model.peer_finack(0);
    wait_closed(0, 1, 1000);
    close_req[0] = 1'b0;

    // 1: active close, ACK only, FIN later
    close_req[1] = 1'b1;
    wait_ssr(1, SS_FINACK_WAIT, 1000);
    @(negedge clk) model.peer_ack(1);
    repeat (300) @(posedge clk);
    check(n_fw == 1, "FIN Wait reported");
    check(!tx_allow[1] && rx_allow[1], "FIN Wait: receive only");
    repeat (3 * TO) @(posedge clk);
    check(est[1] && rx_allow[1], "FIN Wait has no timeout");
    @(negedge clk) model.peer_fin(1);
    wait_closed(1, 1, 1000);
    close_req[1] = 1'b0;

    // 2: passive close with data left: half closed
    more_data[2] = 1'b1;
    @(negedge clk) model.peer_fin(2);
    repeat (300) @(posedge clk);
    check(n_pc == 1 && n_hc == 1, "passive close and half close reported");
    check(tx_allow[2] && !rx_allow[2], "Half Closed: transmit only");
    check(model.ssr[2] == SS_PEER_FIN, "no FIN while data is left");
    repeat (500) @(posedge clk);
    more_data[2] = 1'b0;
    wait_ssr(2, SS_LAST_ACK, 1000);
    @(negedge clk) model.peer_ack(2);
    wait_closed(2, 1, 1000);

    // 3: passive close, nothing to send, no final ACK
    @(negedge clk) model.peer_fin(3);
    wait_ssr(3, SS_LAST_ACK, 1000);
    check(n_pc == 2 && n_hc == 1, "second passive close, not half closed");
    wait_closed(3, 1, TO + 1000);
    check(n_to == 1, "ACK Wait timeout reported");

    // 0 again: active close never answered
    @(negedge clk);
    model.ssr[0] = SS_ESTABLISHED;
    est[0] = 1'b1;
    repeat (50) @(posedge clk);
    close_req[0] = 1'b1;
    wait_ssr(0, SS_FINACK_WAIT, 1000);
    wait_closed(0, 2, TO + 1000);
    check(n_to == 2, "FIN ACK Wait timeout reported");
    check(n_ac == 3, $sformatf("%0d active closes reported", n_ac));
    check(model.timing_err == 0, "bus timing");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
