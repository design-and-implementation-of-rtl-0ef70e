// tb_nc_reconfig_mss: two UDP channels streaming while one of them is
// reconfigured to a larger maximum segment size.
//
// This is the run-time reconfiguration scenario the controller was built
// for: channels 0 and 1 both run UDP with a 128-byte MSS and carry a
// steady stream of random bytes from the application (one byte every GAP
// clocks on average, about 8 Mbit/s, so near the 10 Mbit/s line rate);
// channel 1 sits in
// the reconfigurable region (RP_CH = 1). Midway, rp_busy is raised for a
// while (the partial bitstream loading) and then dropped with rp_variant = 1,
// the module with a 1024-byte MSS. The test checks that
//   - channel 0 keeps transmitting, and keeps receiving peer data, while
//     channel 1 is being reconfigured;
//   - channel 1 sends nothing once isolated, is released only after its
//     re-initialisation, and then runs with MSS 1024 while channel 0 keeps
//     128;
//   - every byte written to either transmit FIFO leaves the chip once and
//     in order, across the reconfiguration (bytes queued for channel 1 wait
//     in its FIFO rather than being lost);
//   - the chip saw no bus timing violation, and one reconfiguration event.
// FIFO depth is reduced to 64 bytes to keep the streams short; everything
// else is at its default.
module tb_nc_reconfig_mss;
  import nc_pkg::*;

  localparam int unsigned PHASE = 60000;   // clocks per phase
  localparam int unsigned GAP   = 48;      // mean clocks between application bytes

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
    .CH_TCP(4'b0000), .RP_CH(1), .ALT_TCP(1'b0), .ALT_MSS(16'd1024), .FIFO_DEPTH(64)
  ) dut (.*);

  w3100a_model #(.SEND_DELAY(200)) model (
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

  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int n_reconfig = 0;
  always @(posedge clk) if (!rst && events[14]) n_reconfig++;

  // ---- application side ----------------------------------------------------
  bit  stream [2];
  byte tx_exp [2][$];
  byte rx_exp [$];
  int  rx_err = 0;

  initial begin
    for (int c = 0; c < 4; c++) tx_din[c] = 8'h00;
    stream[0] = 0; stream[1] = 0;
  end

  always @(negedge clk) begin
    for (int c = 0; c < 2; c++) begin
      if (stream[c] && !tx_full[c] && $urandom_range(GAP - 1) == 0) begin
        tx_wr[c]  = 1'b1;
        tx_din[c] = 8'($urandom);
        tx_exp[c].push_back(byte'(tx_din[c]));
      end else begin
        tx_wr[c] = 1'b0;
      end
    end
  end

  assign rx_rd = rst ? 4'b0 : ~rx_empty;

  always @(posedge clk) begin
    if (rx_rd[0]) begin
      if (rx_exp.size() == 0 || byte'(rx_dout[0]) != rx_exp[0]) rx_err++;
      if (rx_exp.size() > 0) void'(rx_exp.pop_front());
    end
  end

  function automatic logic [15:0] mss_of(input int c);
    return {model.reg_byte(int'(chreg_addr(2'(c), O_MSSR))), model.reg_byte(int'(chreg_addr(2'(c), O_MSSR + 1)))};
  endfunction

  initial begin
    int s0, s1, before0, during0, during1, after1, t;
    byte d [$];

    repeat (5) @(posedge clk);
    rst = 1'b0;
    t = 0;
    while (!init_done && t < 100000) begin @(posedge clk); t++; end
    check(init_done, "initialised");
    check(mss_of(0) == 16'd128 && mss_of(1) == 16'd128, "both channels start with MSS 128");
    check(!ch_is_tcp[0] && !ch_is_tcp[1], "both channels run UDP");

    // both channels stream
    @(negedge clk);
    stream[0] = 1; stream[1] = 1;
    s0 = model.sent_q[0].size();
    repeat (PHASE) @(posedge clk);
    before0 = model.sent_q[0].size() - s0;
    check(before0 > 0 && model.sent_q[1].size() > 0, "both channels transmit before reconfiguration");

    // channel 1 reconfigured while channel 0 keeps going
    @(negedge clk);
    rp_variant = 1'b1;
    rp_busy    = 1'b1;
    repeat (3000) @(posedge clk);              // a burst already started may finish
    check(!tx_up[1] && !rx_up[1], "channel 1 isolated");
    check(tx_up[0] && rx_up[0], "channel 0 still up");
    s0 = model.sent_q[0].size();
    s1 = model.sent_q[1].size();
    for (int i = 0; i < 200; i++) d.push_back(byte'($urandom));
    @(negedge clk);
    check(model.peer_data(0, d) == 200, "peer data for channel 0 fits");
    foreach (d[i]) rx_exp.push_back(d[i]);
    repeat (PHASE) @(posedge clk);
    during0 = model.sent_q[0].size() - s0;
    during1 = model.sent_q[1].size() - s1;
    check(during0 >= before0 / 2, $sformatf("channel 0 sent %0d bytes during reconfiguration (%0d before)", during0, before0));
    check(during1 == 0, $sformatf("channel 1 sent %0d bytes while isolated", during1));
    check(rx_exp.size() == 0 && rx_err == 0, "channel 0 received its peer data during reconfiguration");

    // loading done: channel 1 re-initialised with MSS 1024
    @(negedge clk);
    rp_busy = 1'b0;
    t = 0;
    while (!tx_up[1] && t < 20000) begin
      @(posedge clk); t++;
      if (tx_up[1] && mss_of(1) != 16'd1024) check(1'b0, "channel 1 released before its MSS was written");
    end
    check(tx_up[1] && rx_up[1], "channel 1 back after reconfiguration");
    check(mss_of(1) == 16'd1024, "channel 1 MSS 1024 after reconfiguration");
    check(mss_of(0) == 16'd128, "channel 0 MSS unchanged");
    check(!ch_is_tcp[1], "channel 1 still UDP");
    repeat (2) @(posedge clk);
    check(n_reconfig == 1, "one reconfiguration reported");
    s1 = model.sent_q[1].size();
    repeat (PHASE) @(posedge clk);
    after1 = model.sent_q[1].size() - s1;
    check(after1 > 0, "channel 1 transmits after reconfiguration");

    // stop the streams, let everything drain, compare byte for byte
    @(negedge clk);
    stream[0] = 0; stream[1] = 0;
    for (int c = 0; c < 2; c++) begin
      t = 0;
      while (model.sent_q[c].size() < tx_exp[c].size() && t < 200000) begin @(posedge clk); t++; end
      check(model.sent_q[c].size() == tx_exp[c].size(),
            $sformatf("channel %0d sent %0d bytes, %0d written", c, model.sent_q[c].size(), tx_exp[c].size()));
      t = 0;
      while (model.sent_q[c].size() > 0 && tx_exp[c].size() > 0) begin
        if (model.sent_q[c].pop_front() != tx_exp[c].pop_front()) t++;
      end
      check(t == 0, $sformatf("channel %0d bytes in order (%0d differ)", c, t));
    end
    check(model.timing_err == 0, "no bus timing violations");
    check(model.sent_q[2].size() == 0 && model.sent_q[3].size() == 0, "nothing sent on the idle channels");

    $display("before %0d, during %0d (channel 0); after %0d (channel 1)", before0, during0, after1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
