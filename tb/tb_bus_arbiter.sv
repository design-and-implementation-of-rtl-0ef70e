// tb_bus_arbiter: checks the round-robin arbiter in front of the W3100A bus.
//
// Five masters raise random requests and hold them until their done; a
// simple slave answers each access after 1 to 4 clocks with data derived
// from the address. The testbench checks that only the owner's request
// reaches the slave, that done and data go to the right master only, that
// no master is passed over more than N-1 times while it waits (round robin),
// and, with every master requesting, that grants rotate 0,1,2,3,4.
module tb_bus_arbiter;
  import nc_pkg::*;

  localparam int N = 5;
  logic clk = 1'b0;
  logic rst = 1'b1;
  always #10 clk = ~clk;

  bus_req_t m_req [N];
  bus_rsp_t m_rsp [N];
  bus_req_t s_req;
  bus_rsp_t s_rsp;

  bus_arbiter #(.N(N)) dut (.*);

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

  // slave: answers after a random delay, rdata = low address byte xor 0x5A
  int wait_n = -1;
  initial s_rsp = '0;
  always @(posedge clk) begin
    s_rsp.done <= 1'b0;
    if (!rst && s_req.req && !s_rsp.done) begin
      if (wait_n < 0) wait_n = $urandom_range(3, 0);
      else if (wait_n == 0) begin
        s_rsp.done  <= 1'b1;
        s_rsp.rdata <= s_req.addr[7:0] ^ 8'h5A;
        wait_n = -1;
      end else wait_n--;
    end
  end

  // masters
  bit   all_on = 0;
  int   passed [N];
  int   served [N];
  int   grants [$];
  initial for (int i = 0; i < N; i++) begin m_req[i] = '0; passed[i] = 0; served[i] = 0; end

  // checks at the falling edge, where the clocked outputs have settled
  bit got [N];
  initial foreach (got[i]) got[i] = 0;
  always @(negedge clk) begin
    if (!rst) begin
      int who;
      who = -1;
      for (int i = 0; i < N; i++) if (m_rsp[i].done) begin
        check(who < 0, "one done at a time");
        who = i;
      end
      if (who >= 0) begin
        check(m_req[who].req, "done only to a requesting master");
        check(m_rsp[who].rdata == (m_req[who].addr[7:0] ^ 8'h5A), "data of the owner's access");
        check(s_req.addr == m_req[who].addr, "slave sees the owner's request");
        grants.push_back(who);
        served[who]++;
        got[who] = 1;
        for (int i = 0; i < N; i++) if (i != who && m_req[i].req) begin
          passed[i]++;
          check(passed[i] < N, $sformatf("master %0d passed over %0d times", i, passed[i]));
        end
        passed[who] = 0;
      end
    end
  end

  // a master holds its request up to the clock edge that ends its access
  always @(posedge clk) begin
    if (!rst) for (int i = 0; i < N; i++) begin
      if (got[i] || !m_req[i].req) begin
        got[i] = 0;
        if (all_on || $urandom_range(2, 0) == 0)
          m_req[i] <= '{req: 1'b1, we: 1'($urandom), addr: {3'(i), 12'($urandom)}, wdata: 8'($urandom)};
        else
          m_req[i].req <= 1'b0;
      end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst = 1'b0;
    repeat (3000) @(posedge clk);
    all_on = 1;
    repeat (20) @(posedge clk);
    grants.delete();
    repeat (300) @(posedge clk);
    for (int k = 1; k < grants.size(); k++)
      check(grants[k] == (grants[k-1] + 1) % N, "strict rotation with all masters requesting");
    for (int i = 0; i < N; i++) check(served[i] > 10, $sformatf("master %0d served", i));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
