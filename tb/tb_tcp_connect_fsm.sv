// tb_tcp_connect_fsm: checks the TCP connection-opening state machine.
//
// The machine commands a behavioural W3100A through the bus cycle
// generator. Channel 3 opens actively, channel 1 passively; channels 0 and
// 2 are UDP and must never be touched. The testbench plays the remote side
// through the model and checks, with TIMEOUT reduced to 2000 clocks:
//   active:  no ARP reply -> ARP Wait times out, socket closed, retried
//            after RETRY_GAP; a reset answering the SYN -> back to Closed;
//            a normal exchange -> Established, reported by est and ev_open.
//   passive: listen -> SYN Wait, which has no timeout; SYN -> ACK Wait; no
//            final ACK -> timeout and listen again; SYN and ACK -> Established.
//   close:   the closed input returns an established channel to Closed, and
//            with open_req still high it is opened again.
module tb_tcp_connect_fsm;
  import nc_pkg::*;

  localparam int TO = 2000, GAP = 300;
  logic clk = 1'b0;
  logic rst = 1'b1;
  always #10 clk = ~clk;

  logic [3:0] open_req = '0, closed = '0, est;
  logic       ev_open, ev_timeout, ev_reset;
  bus_req_t   m_req;
  bus_rsp_t   m_rsp;
  logic       data_oe, cs_n, rd_n, wr_n, int_n;
  logic [14:0] addr_o;
  logic [7:0] data_o, data_i;

  tcp_connect_fsm #(.TIMEOUT(TO), .RETRY_GAP(GAP)) dut (
    .clk, .rst, .enable(1'b1), .ch_tcp(4'b1010), .ch_active(4'b1000), .open_req, .closed, .est,
    .m_req, .m_rsp, .ev_open, .ev_timeout, .ev_reset);
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

  int n_open = 0, n_to = 0, n_rst = 0, udp_touched = 0;
  bit listening = 0, passive_closed = 0;
  always @(posedge clk) if (listening && model.ssr[1] == SS_CLOSED) passive_closed = 1;
  always @(posedge clk) begin
    if (!rst && ev_open) n_open++;
    if (!rst && ev_timeout) n_to++;
    if (!rst && ev_reset) n_rst++;
    if (!rst && !wr_n && (addr_o == cr_addr(0) || addr_o == cr_addr(2))) udp_touched++;
  end

  task automatic wait_ssr(input int c, input logic [7:0] s, input int limit, output int took);
    took = 0;
    while (model.ssr[c] != s && took < limit) begin @(posedge clk); took++; end
    check(model.ssr[c] == s, $sformatf("channel %0d reaches socket state %02h (is %02h)", c, s, model.ssr[c]));
  endtask

  initial begin
    int t;
    repeat (3) @(posedge clk);
    rst = 1'b0;
    for (int c = 0; c < 4; c++) model.ssr[c] = (c == 1 || c == 3) ? SS_CLOSED : SS_UDP;
    repeat (50) @(posedge clk);
    check(model.writes == 0 && est == 0, "nothing happens without open_req");

    // active open, no ARP reply
    model.peer_up[3] = 1'b0;
    open_req[3] = 1'b1;
    wait_ssr(3, SS_ARP_WAIT, 1000, t);
    wait_ssr(3, SS_CLOSED, TO + 500, t);
    check(t >= TO - 200, $sformatf("ARP Wait lasted %0d clocks before the timeout", t));
    check(n_to == 1, "connect timeout reported");
    wait_ssr(3, SS_ARP_WAIT, GAP + 500, t);
    check(t >= GAP - 50, $sformatf("retried after %0d clocks", t));
    // reset from the peer
    model.peer_up[3] = 1'b1;
    model.peer_rst[3] = 1'b1;
    wait_ssr(3, SS_SYNACK_WAIT, TO + 500, t);
    wait_ssr(3, SS_CLOSED, 500, t);
    t = 0;
    while (n_rst == 0 && t < 500) begin @(posedge clk); t++; end
    check(n_rst == 1, "reset reported");
    check(!est[3], "not established after a reset");
    // normal open
    model.peer_rst[3] = 1'b0;
    t = 0;
    while (!est[3] && t < 5000) begin @(posedge clk); t++; end
    repeat (2) @(posedge clk);
    check(est[3] && model.ssr[3] == SS_ESTABLISHED, "active open established");
    check(n_open == 1, "open reported");

    // passive open
    open_req[1] = 1'b1;
    wait_ssr(1, SS_SYN_WAIT, 1000, t);
    listening = 1;
    repeat (3 * TO) @(posedge clk);
    check(model.ssr[1] == SS_SYN_WAIT && !est[1], "SYN Wait has no timeout");
    @(negedge clk) model.peer_syn(1);
    wait_ssr(1, SS_ACK_WAIT, 10, t);
    t = n_to;
    wait_ssr(1, SS_SYN_WAIT, TO + 1000, t);
    check(n_to == 2, "ACK Wait timeout reported");
    @(negedge clk) model.peer_syn(1);
    repeat (100) @(posedge clk);
    @(negedge clk) model.peer_ack(1);
    t = 0;
    while (!est[1] && t < 1000) begin @(posedge clk); t++; end
    repeat (2) @(posedge clk);
    check(est[1], "passive open established");
    check(n_open == 2, "second open reported");
    check(!passive_closed, "a listening channel is never closed");
    listening = 0;

    // the peer closed channel 3: the disconnect side reports it, the channel reopens
    @(negedge clk) model.peer_reset(3);
    closed[3] = 1'b1;
    @(negedge clk) closed[3] = 1'b0;
    @(negedge clk);
    check(!est[3], "closed clears established");
    t = 0;
    while (!est[3] && t < GAP + 5000) begin @(posedge clk); t++; end
    repeat (2) @(posedge clk);
    check(est[3] && n_open == 3, "reopened while open_req is high");
    check(est[1], "channel 1 unaffected");

    // dropping open_req: a closed channel stays closed
    open_req[3] = 1'b0;
    @(negedge clk) model.peer_reset(3);
    closed[3] = 1'b1;
    @(negedge clk) closed[3] = 1'b0;
    repeat (GAP + 3000) @(posedge clk);
    check(!est[3] && model.ssr[3] == SS_CLOSED, "no reopening without open_req");
    check(udp_touched == 0, "UDP channels never commanded");
    check(model.timing_err == 0, "bus timing");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
