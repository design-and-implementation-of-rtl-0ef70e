// tb_sync_fifo: checks the show-ahead FIFO used for the eight data FIFOs.
//
// Random pushes and pops, with phases that fill it to full and drain it to
// empty, are compared against a queue: the head byte, empty, full and the
// fill count on every clock, and that a push when full and a pop when empty
// change nothing. Runs at the default depth of 256.
module tb_sync_fifo;
  localparam int DEPTH = 256;
  logic clk = 1'b0;
  logic rst = 1'b1;
  always #10 clk = ~clk;

  logic       wr_en = 1'b0, rd_en = 1'b0, full, empty;
  logic [7:0] din = '0, dout;
  logic [$clog2(DEPTH+1)-1:0] count;

  sync_fifo #(.WIDTH(8), .DEPTH(DEPTH)) dut (.*);

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

  logic [7:0] q [$];
  int push_pct = 50;
  bit saw_full = 0, saw_empty = 0;
  bit do_w, do_r;

  always @(posedge clk) begin
    if (!rst) begin
      check(empty == (q.size() == 0), "empty flag");
      check(full == (q.size() == DEPTH), "full flag");
      check(int'(count) == q.size(), "count");
      if (q.size() > 0) check(dout == q[0], "head byte");
      if (full) saw_full = 1;
      if (empty) saw_empty = 1;
      do_w = wr_en && q.size() < DEPTH;
      do_r = rd_en && q.size() > 0;
      if (do_r) void'(q.pop_front());
      if (do_w) q.push_back(din);
    end
  end

  always @(negedge clk) begin
    wr_en = ($urandom_range(99, 0) < push_pct);
    din   = 8'($urandom);
    rd_en = ($urandom_range(99, 0) < 100 - push_pct);
  end

  initial begin
    repeat (3) @(posedge clk);
    rst = 1'b0;
    repeat (2000) @(posedge clk);
    push_pct = 90;
    repeat (3000) @(posedge clk);
    push_pct = 10;
    repeat (3000) @(posedge clk);
    push_pct = 50;
    repeat (2000) @(posedge clk);
    check(saw_full && saw_empty, "reached full and empty");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
