// tb_channel_classifier: checks the receive-side channel classifier.
//
// Random bytes tagged with random channel numbers are offered with random
// channel enables and FIFO-full flags. Each byte must be written to exactly
// the FIFO of its channel, with its value, when that channel is enabled,
// and counted as dropped otherwise; in_full must reflect the addressed
// FIFO's full flag for an enabled channel.
module tb_channel_classifier;
  logic clk = 1'b0;
  logic rst = 1'b1;
  always #10 clk = ~clk;

  logic [3:0]  rx_en = '0, fifo_full = '0, fifo_wr;
  logic        in_valid = 1'b0, in_full;
  logic [7:0]  in_data = '0, fifo_din;
  logic [1:0]  in_ch = '0;
  logic [15:0] drop_cnt;

  channel_classifier #(.NCH(4)) dut (.*);

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

  int drops = 0, writes [4];
  initial begin
    foreach (writes[c]) writes[c] = 0;
    repeat (3) @(posedge clk);
    rst = 1'b0;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      in_valid  = 1'($urandom);
      in_data   = 8'($urandom);
      in_ch     = 2'($urandom);
      if (i % 100 == 0) rx_en = 4'($urandom);
      fifo_full = 4'($urandom);
      #1;
      check(fifo_wr == ((in_valid && rx_en[in_ch]) ? (4'b1 << in_ch) : 4'b0), "write strobe to the byte's channel only");
      check(fifo_din == in_data, "data passed to the FIFOs");
      check(in_full == (rx_en[in_ch] && fifo_full[in_ch]), "full flag of the addressed FIFO");
      if (in_valid && !rx_en[in_ch]) drops++;
      if (in_valid && rx_en[in_ch]) writes[in_ch]++;
      @(posedge clk);
      #1;
      check(int'(drop_cnt) == drops, "drop counter");
    end
    foreach (writes[c]) check(writes[c] > 50, "every channel received");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
