// tb_w3100a_bus_if: checks the W3100A bus cycle generator.
//
// Random reads and writes to the chip's buffer memory go through the
// interface to a behavioural W3100A. The testbench measures every cycle on
// the pins itself: the cycle length from start to done (9 clocks for a
// read, 8 for a write, i.e. 180 ns and 160 ns at 50 MHz), CS held low for at
// least 5 clocks (100 ns), RD or WR falling at least one clock after CS and
// rising at least one clock before it, the address stable under CS, the
// write data driven while WR is low, and the data read back equal to what
// was written before.
module tb_w3100a_bus_if;
  import nc_pkg::*;

  logic clk = 1'b0;
  logic rst = 1'b1;
  always #10 clk = ~clk;

  bus_req_t    req = '0;
  bus_rsp_t    rsp;
  logic        busy, data_oe, cs_n, rd_n, wr_n, int_n;
  logic [14:0] addr_o;
  logic [7:0]  data_o, data_i;

  w3100a_bus_if dut (.*);

  w3100a_model model (
    .clk, .rst_pin(rst), .addr(addr_o), .din(data_o), .din_oe(data_oe), .dout(data_i),
    .cs_n, .rd_n, .wr_n, .int_n
  );

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

  // pin-level measurement of the current cycle
  int   len, cs_low, strobe_low, cs_before, gap_after;
  bit   strobe_seen, strobe_ended, addr_moved, data_bad;
  logic [14:0] addr_cs;
  always @(posedge clk) begin
    if (busy) len++;
    if (!cs_n) begin
      if (cs_low == 0) addr_cs = addr_o;
      else if (addr_o != addr_cs) addr_moved = 1;
      cs_low++;
      if (!rd_n || !wr_n) begin
        strobe_low++;
        if (!strobe_seen) cs_before = cs_low - 1;
        strobe_seen = 1;
        if (!wr_n && (!data_oe || data_o != req.wdata)) data_bad = 1;
      end else if (strobe_seen) begin
        strobe_ended = 1;
        gap_after++;
      end
    end
    if ((!rd_n || !wr_n) && cs_n) data_bad = 1;
  end

  task automatic access(input bit we, input logic [14:0] a, input logic [7:0] d, output logic [7:0] q);
    int t = 0;
    @(negedge clk);
    len = 0; cs_low = 0; strobe_low = 0; cs_before = 0; gap_after = 0;
    strobe_seen = 0; strobe_ended = 0; addr_moved = 0; data_bad = 0;
    req = '{req: 1'b1, we: we, addr: a, wdata: d};
    do begin @(posedge clk); t++; end while (!rsp.done && t < 100);
    q = rsp.rdata;
    @(negedge clk);
    req.req = 1'b0;
    check(rsp.done || t < 100, "cycle completes");
    check(len == (we ? 8 : 9), $sformatf("%s takes %0d clocks", we ? "write" : "read", len));
    check(cs_low >= 5, $sformatf("CS low %0d clocks", cs_low));
    check(cs_before >= 1 && gap_after >= 1, "strobe inside CS with a clock either side");
    check(strobe_low >= 3, "strobe long enough");
    check(!addr_moved && addr_cs == a, "address held under CS");
    check(!data_bad, "write data driven under WR, no strobe outside CS");
  endtask

  initial begin
    logic [7:0] shadow [logic [14:0]];
    logic [14:0] a;
    logic [7:0]  d, q;
    repeat (3) @(posedge clk);
    rst = 1'b0;
    repeat (2) @(posedge clk);
    for (int i = 0; i < 200; i++) begin
      if (shadow.num() == 0 || $urandom_range(1, 0) == 1) begin
        a = 15'(A_TXBUF + $urandom_range(16'h3FFF, 0));
        d = 8'($urandom);
        access(1'b1, a, d, q);
        shadow[a] = d;
      end else begin
        void'(shadow.first(a));
        repeat ($urandom_range(shadow.num() - 1, 0)) void'(shadow.next(a));
        access(1'b0, a, 8'h00, q);
        check(q == shadow[a], $sformatf("read %04h gives %02h, expected %02h", a, q, shadow[a]));
      end
    end
    check(model.timing_err == 0, "bus rules seen by the chip model");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
