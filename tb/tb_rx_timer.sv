// tb_rx_timer: checks the throughput measurement counter.
//
// Bursts of random length and density are fed as received bytes, separated
// by idle periods longer than the (reduced) idle timeout of 50 clocks.
// The testbench keeps its own record of each burst's first and last byte
// time and byte count and checks the reported elapsed clocks and bytes, that
// the result comes exactly IDLE_TIMEOUT clocks after the last byte, and
// that the free-running time stamp counts clocks.
module tb_rx_timer;
  localparam int IDLE = 50;
  logic clk = 1'b0;
  logic rst = 1'b1;
  always #10 clk = ~clk;

  logic        rx_valid = 1'b0, result_valid;
  logic [31:0] now, elapsed, bytes;

  rx_timer #(.IDLE_TIMEOUT(IDLE)) dut (.*);

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

  int cyc = 0, first_c, last_c, n, results = 0;
  logic [31:0] now_prev;
  always @(posedge clk) if (!rst) cyc++;

  initial begin
    repeat (3) @(posedge clk);
    rst = 1'b0;
    @(posedge clk);
    now_prev = now;
    @(posedge clk);
    check(now == now_prev + 1, "time stamp counts clocks");
    for (int b = 0; b < 30; b++) begin
      int len, wait_c;
      len = $urandom_range(200, 1);
      n = 0;
      for (int i = 0; i < len; i++) begin
        @(negedge clk);
        rx_valid = (i == 0 || i == len - 1) ? 1'b1 : 1'($urandom_range(3, 0) != 0);
        if (rx_valid) begin
          if (n == 0) first_c = cyc;
          last_c = cyc;
          n++;
        end
      end
      @(negedge clk);
      rx_valid = 1'b0;
      wait_c = 0;
      while (!result_valid && wait_c < 200) begin @(posedge clk); #1; wait_c++; end
      check(result_valid, "result after the idle time");
      check(cyc - last_c == IDLE + 1, $sformatf("result %0d clocks after the last byte", cyc - last_c));
      check(int'(elapsed) == last_c - first_c, $sformatf("elapsed %0d expected %0d", elapsed, last_c - first_c));
      check(int'(bytes) == n, $sformatf("bytes %0d expected %0d", bytes, n));
      results++;
      repeat ($urandom_range(20, 0)) @(posedge clk);
    end
    check(results == 30, "one result per burst");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
