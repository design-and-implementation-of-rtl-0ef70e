// tb_channel_arbiter: checks the round-robin channel arbiter of the
// transmit path.
//
// Four modelled FIFOs are filled with random bytes; the testbench plays the
// transmission state machine, taking bytes at random moments and answering
// each flush with send_done after a random delay. It checks that the bytes
// of each channel come out in order and tagged with their channel, that a
// burst never exceeds MAX_BURST (reduced to 16) and is cut exactly there
// (with ev_burst_limit), that after a flush the next channel served is the
// next higher one that has data, and that a disabled channel is never served.
module tb_channel_arbiter;
  localparam int NCH = 4, MB = 16;
  logic clk = 1'b0;
  logic rst = 1'b1;
  always #10 clk = ~clk;

  logic [NCH-1:0] chan_en = '1, fifo_empty, fifo_rd;
  logic [7:0]     fifo_dout [NCH];
  logic           valid, pop = 1'b0, flush, send_done = 1'b0, ev_burst_limit;
  logic [7:0]     data;
  logic [1:0]     ch;

  channel_arbiter #(.NCH(NCH), .MAX_BURST(MB)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (t=%0t)", what, $time); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [7:0] q [NCH][$];
  always_comb for (int c = 0; c < NCH; c++) begin
    fifo_empty[c] = (q[c].size() == 0);
    fifo_dout[c]  = (q[c].size() > 0) ? q[c][0] : 8'h00;
  end

  int burst = 0, last_ch = -1, limits = 0, ev_limits = 0, bursts = 0, wait_done = -1;
  bit in_flush = 0, pushed_since = 0;
  logic [NCH-1:0] had_data;
  int push_req [NCH];
  initial foreach (push_req[c]) push_req[c] = 0;

  // values the arbiter saw at the last rising edge
  logic v_s = 1'b0, p_s = 1'b0, ev_s = 1'b0;
  logic [1:0] c_s = '0;
  always @(posedge clk) begin
    v_s <= valid; p_s <= pop; c_s <= ch; ev_s <= ev_burst_limit;
  end

  // the FIFOs and the transmission side, all updated at the falling edge
  always @(negedge clk) begin
    if (!rst) begin
      if (ev_s) ev_limits++;
      if (v_s && p_s) begin                  // the byte taken at the last edge
        void'(q[c_s].pop_front());
        burst++;
        check(burst <= MB, "burst within MAX_BURST");
      end
      if (flush && !in_flush) begin
        in_flush = 1;
        bursts++;
        if (burst == MB) limits++;
        check(burst == MB || q[ch].size() == 0 || !chan_en[ch], "burst ends only when empty or at the limit");
        last_ch = ch;
        burst = 0;
        wait_done = $urandom_range(5, 0);
      end
      send_done = 1'b0;
      if (in_flush) begin
        if (wait_done == 0) begin
          send_done = 1'b1; in_flush = 0; wait_done = -1;
          for (int c = 0; c < NCH; c++) had_data[c] = chan_en[c] && q[c].size() > 0;
          pushed_since = 0;
        end else wait_done--;
      end
      #1;
      pop = valid && ($urandom_range(2, 0) != 0);
      #1;
      if (pop) begin
        check(chan_en[ch], "disabled channel served");
        check(fifo_rd == (4'b1 << ch), "only the served FIFO is read");
        check(data == q[ch][0], "data is the head of the served FIFO");
        if (burst == 0 && last_ch >= 0 && !pushed_since) begin
          int exp_ch;
          exp_ch = -1;
          for (int k = 1; k <= NCH; k++)
            if (exp_ch < 0 && had_data[(last_ch + k) % NCH]) exp_ch = (last_ch + k) % NCH;
          if (exp_ch >= 0) check(int'(ch) == exp_ch, $sformatf("round robin: got %0d expected %0d", ch, exp_ch));
        end
      end
      for (int c = 0; c < NCH; c++) if (push_req[c] > 0) begin
        repeat (push_req[c]) q[c].push_back(8'($urandom));
        push_req[c] = 0;
        pushed_since = 1;
      end
    end
  end

  initial begin
    had_data = '0;
    repeat (3) @(posedge clk);
    rst = 1'b0;
    for (int round = 0; round < 40; round++) begin
      for (int c = 0; c < NCH; c++)
        if ($urandom_range(1, 0) == 1) push_req[c] = $urandom_range(40, 1);
      if (round == 20) chan_en = 4'b1011;
      if (round == 30) chan_en = 4'b1111;
      repeat (400) @(posedge clk);
    end
    repeat (2000) @(posedge clk);
    for (int c = 0; c < NCH; c++) check(q[c].size() == 0, $sformatf("FIFO %0d drained", c));
    check(limits > 0 && limits == ev_limits, $sformatf("burst limit reached %0d times, reported %0d", limits, ev_limits));
    check(bursts > 40, "many bursts");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
