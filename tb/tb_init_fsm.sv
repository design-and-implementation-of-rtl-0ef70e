// tb_init_fsm: checks chip initialisation and channel re-initialisation.
//
// The initialisation machine runs with the network data ROM, the bus cycle
// generator and a behavioural W3100A. Checks: the chip's reset pin is held
// high for at least 16 clocks after reset; init_done rises only after the
// chip has reported its start-up (status 0x01 on channel 0) and after
// exactly 24 + 1 + 4 x 21 writes; the chip then holds the MAC and IP
// addresses, the interrupt mask 0xFF and each channel's set-up, with the UDP
// channels opened as UDP and the TCP channel initialised. Then re-
// initialisations of channel 3 with the alternative section (UDP, MSS 1024)
// and with the original one (TCP, MSS 128) must each write 21 words, touch
// no other channel and end with reinit_done.
module tb_init_fsm;
  import nc_pkg::*;

  logic clk = 1'b0;
  logic rst = 1'b1;
  always #10 clk = ~clk;

  bus_req_t    m_req;
  bus_rsp_t    m_rsp;
  logic [7:0]  rom_addr;
  logic [22:0] rom_data;
  logic        w3_rst, init_done, reinit_req = 1'b0, reinit_alt = 1'b0, reinit_busy, reinit_done;
  logic        data_oe, cs_n, rd_n, wr_n, int_n;
  logic [14:0] addr_o;
  logic [7:0]  data_o, data_i;

  net_data_rom #(.ALT_MSS(16'd1024)) u_rom (.clk, .addr(rom_addr), .data(rom_data));
  init_fsm dut (.*);
  w3100a_bus_if u_bus (.clk, .rst, .req(m_req), .rsp(m_rsp), .busy(), .addr_o, .data_o, .data_oe,
                       .data_i, .cs_n, .rd_n, .wr_n);
  w3100a_model model (.clk, .rst_pin(w3_rst), .addr(addr_o), .din(data_o), .din_oe(data_oe),
                      .dout(data_i), .cs_n, .rd_n, .wr_n, .int_n);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (t=%0t)", what, $time); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int rst_len = 0, init_ok_at = -1, cyc = 0, first_ch_write = -1;
  always @(posedge clk) begin
    cyc++;
    if (!rst && !wr_n && first_ch_write < 0 && addr_o >= A_CH_BASE && addr_o < A_PTR_BASE + 4 * PTR_STRIDE)
      first_ch_write = cyc;
    if (!rst && w3_rst) rst_len++;
    if (init_ok_at < 0 && model.isr[0] == ISR_INIT_OK) init_ok_at = cyc;
  end

  function automatic logic [15:0] reg16(input int a);
    return {model.mem[a], model.mem[a + 1]};
  endfunction

  initial begin
    int t, w0, ch0_sopr;
    repeat (3) @(posedge clk);
    rst = 1'b0;
    t = 0;
    while (!init_done && t < 20000) begin @(posedge clk); t++; end
    check(init_done, "initialisation finishes");
    check(rst_len >= 16, $sformatf("chip reset held %0d clocks", rst_len));
    check(init_ok_at > 0 && init_ok_at < first_ch_write, "channels set up only after the chip reported start-up");
    check(model.writes == 24 + 1 + 84, $sformatf("%0d writes", model.writes));
    check(model.reads >= 1, "status polled");
    check({model.mem[A_SHAR], model.mem[A_SHAR+1], model.mem[A_SHAR+2], model.mem[A_SHAR+3],
           model.mem[A_SHAR+4], model.mem[A_SHAR+5]} == 48'h00_01_02_00_00_01, "MAC address");
    check({reg16(A_SIPR), reg16(A_SIPR + 2)} == {8'd10, 8'd0, 8'd0, 8'd91}, "source IP");
    check({reg16(A_GAR), reg16(A_GAR + 2)} == {8'd10, 8'd0, 8'd0, 8'd1}, "gateway");
    check({reg16(A_SMR), reg16(A_SMR + 2)} == {8'd255, 8'd255, 8'd255, 8'd0}, "subnet mask");
    check(model.mem[A_IMR] == 8'hFF, "interrupt mask");
    for (int c = 0; c < 4; c++) begin
      check(reg16(chreg_addr(2'(c), O_SPORT)) == 16'(10001 + c), $sformatf("channel %0d source port", c));
      check(reg16(chreg_addr(2'(c), O_MSSR)) == 16'd128, $sformatf("channel %0d MSS", c));
      check(model.ssr[c] == ((c == 3) ? SS_INIT : SS_UDP), $sformatf("channel %0d socket opened", c));
    end

    // reconfigured channel 3: alternative section, then the original again
    for (int v = 1; v >= 0; v--) begin
      w0 = model.writes;
      ch0_sopr = model.mem[chreg_addr(0, O_SOPR)];
      @(negedge clk);
      reinit_alt = 1'(v);
      reinit_req = 1'b1;
      @(negedge clk);
      reinit_req = 1'b0;
      t = 0;
      while (!reinit_done && t < 5000) begin @(posedge clk); t++; end
      check(reinit_done, "re-initialisation finishes");
      check(init_done, "init_done stays high");
      check(model.writes - w0 == 21, $sformatf("re-initialisation wrote %0d words", model.writes - w0));
      check(model.mem[chreg_addr(0, O_SOPR)] == 8'(ch0_sopr), "other channels untouched");
      check(reg16(chreg_addr(3, O_MSSR)) == (v ? 16'd1024 : 16'd128), "MSS of the loaded variant");
      check(model.ssr[3] == (v ? SS_UDP : SS_INIT), "protocol of the loaded variant");
      repeat (20) @(posedge clk);
    end
    check(model.timing_err == 0, "bus timing");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
