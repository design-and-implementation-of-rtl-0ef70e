// tb_reconfig_ctrl: checks the control of the reconfigurable channel.
//
// Plays the configuration port (rp_busy while a partial bitstream loads,
// rp_variant naming the module loaded) and the initialisation machine
// (reinit_done some clocks after reinit_req). Checks that the channel is
// isolated from the moment loading starts until its re-initialisation has
// finished, that exactly one re-initialisation of the right variant is
// requested after loading ends (and only once initialisation is done), that
// the channel's protocol follows the loaded variant and that each
// reconfiguration is reported once.
module tb_reconfig_ctrl;
  logic clk = 1'b0;
  logic rst = 1'b1;
  always #10 clk = ~clk;

  logic init_done = 1'b0, rp_busy = 1'b0, rp_variant = 1'b0, reinit_done = 1'b0;
  logic reinit_req, reinit_alt, isolate, rp_tcp, ev_reconfig;

  reconfig_ctrl #(.BASE_TCP(1'b1), .ALT_TCP(1'b0)) dut (.*);

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

  int reqs = 0, evs = 0;
  always @(posedge clk) if (!rst) begin
    if (reinit_req) reqs++;
    if (ev_reconfig) evs++;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst = 1'b0;
    @(negedge clk);
    check(!isolate && rp_tcp, "starts running the original (TCP) module");
    // loading before initialisation has finished: wait for init_done
    rp_busy = 1'b1; rp_variant = 1'b1;
    repeat (5) @(negedge clk);
    rp_busy = 1'b0;
    repeat (10) @(negedge clk);
    check(isolate && reqs == 0, "no re-initialisation before initialisation is done");
    init_done = 1'b1;
    for (int r = 0; r < 20; r++) begin
      int d;
      if (r > 0) begin
        rp_variant = 1'($urandom);
        rp_busy = 1'b1;
        @(negedge clk);
        check(isolate, "isolated while loading");
        repeat ($urandom_range(50, 1)) begin
          @(negedge clk);
          check(isolate && !reinit_req, "isolated, no request while loading");
        end
        rp_busy = 1'b0;
      end
      d = 0;
      while (!reinit_req && d < 20) begin @(negedge clk); d++; end
      check(reinit_req && reinit_alt == rp_variant, "re-initialisation of the loaded variant");
      check(rp_tcp == (rp_variant ? 1'b0 : 1'b1), "protocol follows the variant");
      repeat ($urandom_range(30, 1)) begin
        @(negedge clk);
        check(isolate, "isolated until re-initialised");
      end
      reinit_done = 1'b1;
      @(negedge clk);
      reinit_done = 1'b0;
      @(negedge clk);
      check(!isolate, "running again");
      check(reqs == r + 1 && evs == r + 1, $sformatf("one request and one report per reconfiguration (%0d, %0d)", reqs, evs));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
