// tb_tx_fsm: checks the transmission state machine.
//
// The machine drives a behavioural W3100A through the bus cycle generator.
// The testbench plays the channel arbiter: it offers bursts of random bytes
// on random channels (channel 3 in TCP mode, the others UDP), takes a byte
// off its queue for each pop, and raises flush when a burst is exhausted
// until send_done. Bursts range up to 2600 bytes, more than the 2 KB chip
// buffer, so the free-space calculation must stop the writes (buffer full)
// and the machine must wait for the previous send (send wait); two
// 1500-byte bursts back to back on one channel, with the chip taking 20000
// clocks per send, make the second burst find the first one still unsent. Every byte
// handed over must leave the chip once, in order, on its channel; each send
// command must be preceded by the write pointer update; the bus rules must
// hold.
module tb_tx_fsm;
  import nc_pkg::*;

  logic clk = 1'b0;
  logic rst = 1'b1;
  always #10 clk = ~clk;

  logic       valid = 1'b0, pop, flush = 1'b0, send_done, ev_buf_full, ev_send_wait, ev_send;
  logic [7:0] data = '0;
  logic [1:0] ch = '0;
  bus_req_t   m_req;
  bus_rsp_t   m_rsp;
  logic       data_oe, cs_n, rd_n, wr_n, int_n;
  logic [14:0] addr_o;
  logic [7:0] data_o, data_i;

  tx_fsm dut (.clk, .rst, .enable(1'b1), .ch_tcp(4'b1000), .valid, .data, .ch, .pop, .flush,
              .send_done, .m_req, .m_rsp, .ev_buf_full, .ev_send_wait, .ev_send);
  w3100a_bus_if u_bus (.clk, .rst, .req(m_req), .rsp(m_rsp), .busy(), .addr_o, .data_o, .data_oe,
                       .data_i, .cs_n, .rd_n, .wr_n);
  w3100a_model #(.SEND_DELAY(20000)) model (.clk, .rst_pin(rst), .addr(addr_o), .din(data_o),
                      .din_oe(data_oe), .dout(data_i), .cs_n, .rd_n, .wr_n, .int_n);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (t=%0t)", what, $time); end
  endtask

  initial begin
    repeat (4_000_000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int n_full = 0, n_wait = 0, n_send = 0;
  always @(posedge clk) begin
    if (ev_buf_full) n_full++;
    if (ev_send_wait) n_wait++;
    if (ev_send) n_send++;
  end

  logic [7:0] burst [$];
  logic [7:0] exp [4][$];

  // arbiter side: a byte is handed over at the rising edge where valid and
  // pop are both high; the queue is updated at the falling edge after it
  bit took = 1'b0;
  always @(posedge clk) took <= valid && pop;
  always @(negedge clk) begin
    if (took) void'(burst.pop_front());
    if (pop) check(valid, "pop only while valid");
    valid = (burst.size() > 0) && !flush;
    data  = (burst.size() > 0) ? burst[0] : 8'h00;
    if (send_done) flush = 1'b0;
  end

  initial begin
    int sizes [8] = '{1, 17, 300, 2600, 1500, 1500, 2047, 64};
    repeat (3) @(posedge clk);
    rst = 1'b0;
    // sockets as the chip would have them after initialisation
    for (int c = 0; c < 4; c++) model.ssr[c] = (c == 3) ? SS_ESTABLISHED : SS_UDP;
    for (int b = 0; b < 24; b++) begin
      int n, t;
      n = (b < 8) ? sizes[b] : $urandom_range(700, 1);
      @(negedge clk);
      if (b != 5) ch = 2'($urandom);                 // 4 and 5: same channel, back to back
      for (int i = 0; i < n; i++) begin
        burst.push_back(8'($urandom));
        exp[ch].push_back(burst[$]);
      end
      t = 0;
      while (burst.size() > 0 && t < 200000) begin @(negedge clk); t++; end
      flush = 1'b1;
      t = 0;
      while (flush && t < 20000) begin @(negedge clk); t++; end
      check(!flush, "send_done answers flush");
      if (b != 4) repeat ($urandom_range(30, 0)) @(negedge clk);
    end
    repeat (50000) @(posedge clk);                  // last send completes
    for (int c = 0; c < 4; c++) begin
      check(model.sent_q[c].size() == exp[c].size(),
            $sformatf("channel %0d sent %0d of %0d bytes", c, model.sent_q[c].size(), exp[c].size()));
      for (int i = 0; i < exp[c].size() && i < model.sent_q[c].size(); i++)
        if (model.sent_q[c][i] != byte'(exp[c][i])) begin
          check(1'b0, $sformatf("channel %0d byte %0d", c, i));
          break;
        end
      check(model.ptr[c][P_TW] == 32'(exp[c].size()), "write pointer advanced by the bytes sent");
    end
    check(n_full > 0 && n_wait > 0, $sformatf("buffer full %0d times, send wait %0d times", n_full, n_wait));
    check(n_send >= 24, "a send per burst at least");
    check(model.timing_err == 0, "bus timing and no send while one is pending");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
