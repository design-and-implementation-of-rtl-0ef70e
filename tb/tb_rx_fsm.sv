// tb_rx_fsm: checks the reception state machine.
//
// The machine reads a behavioural W3100A through the bus cycle generator.
// The testbench plays the peer, delivering random amounts of random data on
// random channels (so the chip's receive buffers wrap around), and plays
// a 16-byte receive FIFO emptied at a random, sometimes very slow, rate. Every byte must come
// out once, in order, tagged with its channel, and never while fifo_full is
// high; a channel whose rx_en is low must not be read until it is enabled
// again. Also checked: the receive stall and receive-done events, the read
// pointer written back and the bus rules.
module tb_rx_fsm;
  import nc_pkg::*;

  logic clk = 1'b0;
  logic rst = 1'b1;
  always #10 clk = ~clk;

  logic [3:0] rx_en = 4'b1111;
  logic       out_valid, fifo_full, ev_rx_stall, ev_recv;
  logic [7:0] out_data;
  logic [1:0] out_ch;
  bus_req_t   m_req;
  bus_rsp_t   m_rsp;
  logic       data_oe, cs_n, rd_n, wr_n, int_n;
  logic [14:0] addr_o;
  logic [7:0] data_o, data_i;

  rx_fsm dut (.clk, .rst, .enable(1'b1), .int_n, .rx_en, .out_valid, .out_data, .out_ch, .fifo_full,
              .m_req, .m_rsp, .ev_rx_stall, .ev_recv);
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
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  byte exp [4][$];
  int  n_stall = 0, n_recv = 0, bad = 0;
  // a 16-byte receive FIFO, emptied at a random rate (slow in some phases)
  int fill = 0, drain_pct = 50;
  assign fifo_full = (fill >= 16);
  always @(posedge clk) begin
    if (!rst) begin
      if (ev_rx_stall) n_stall++;
      if (ev_recv) n_recv++;
      if (fill > 0 && $urandom_range(99, 0) < drain_pct) fill <= fill - 1 + (out_valid ? 1 : 0);
      else if (out_valid) fill <= fill + 1;
      if (out_valid) begin
        if (fill >= 16) bad++;
        if (!rx_en[out_ch]) bad++;
        if (exp[out_ch].size() == 0 || exp[out_ch][0] != byte'(out_data)) bad++;
        if (exp[out_ch].size() > 0) void'(exp[out_ch].pop_front());
      end
    end
  end


  task automatic deliver(input int c, input int n);
    byte d [$];
    int k;
    for (int i = 0; i < n; i++) d.push_back(byte'($urandom));
    @(negedge clk);
    k = model.peer_data(c, d);
    for (int i = 0; i < k; i++) exp[c].push_back(d[i]);
  endtask

  function automatic int left();
    return exp[0].size() + exp[1].size() + exp[2].size() + exp[3].size();
  endfunction

  initial begin
    int t;
    repeat (3) @(posedge clk);
    rst = 1'b0;
    @(negedge clk);
    model.mem[A_IMR] = 8'hFF;
    for (int c = 0; c < 4; c++) model.ssr[c] = SS_UDP;
    for (int r = 0; r < 40; r++) begin
      drain_pct = (r % 10 < 3) ? 2 : 50;
      deliver($urandom_range(3, 0), $urandom_range(300, 1));
      if ($urandom_range(1, 0) == 1) deliver($urandom_range(3, 0), $urandom_range(300, 1));
      repeat ($urandom_range(3000, 0)) @(posedge clk);
    end
    drain_pct = 50;
    t = 0;
    while (left() > 0 && t < 200000) begin @(posedge clk); t++; end
    check(left() == 0, $sformatf("all delivered bytes read (%0d left)", left()));

    // a disabled channel is not read
    rx_en = 4'b1011;
    deliver(2, 50);
    deliver(1, 20);
    repeat (5000) @(posedge clk);
    check(exp[2].size() == 50 && exp[1].size() == 0, "disabled channel left alone, others read");
    rx_en = 4'b1111;
    deliver(2, 10);                                  // the next arrival wakes it up
    t = 0;
    while (left() > 0 && t < 50000) begin @(posedge clk); t++; end
    check(left() == 0, "disabled channel read once enabled");
    repeat (200) @(posedge clk);                    // pointer update and receive command

    for (int c = 0; c < 4; c++)
      check(model.ptr[c][P_RR] == model.ptr[c][P_RW], $sformatf("channel %0d read pointer caught up", c));
    check(bad == 0, $sformatf("%0d bytes out of order, on a disabled channel or into a full FIFO", bad));
    check(n_stall > 0 && n_recv > 40, $sformatf("stalls %0d, receive commands %0d", n_stall, n_recv));
    check(model.timing_err == 0, "bus timing");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
