// tb_net_data_rom: checks the contents and read latency of the network
// data ROM.
//
// The expected table is written out here independently, field by field in
// the order the initialisation plays it back: MAC (6), source IP (4),
// gateway (4), subnet mask (4), retry time (2), retry count, the two memory
// size registers, the interrupt mask, then for each channel the 21 writes of
// its section (protocol, source port, destination IP, destination port,
// TOS, MSS, the cleared write and read pointers, socket initialise), and the
// alternative section of the reconfigurable channel. Non-default parameters
// are used so that swapped bytes or channels show. Each word of all 256
// addresses is read in random order and must appear one clock later; words
// past the end read as zero.
module tb_net_data_rom;
  import nc_pkg::*;

  localparam logic [47:0]  MAC   = 48'h12_34_56_78_9A_BC;
  localparam logic [31:0]  IP    = {8'd192, 8'd168, 8'd1, 8'd7};
  localparam logic [31:0]  GW    = {8'd192, 8'd168, 8'd1, 8'd1};
  localparam logic [31:0]  SN    = {8'd255, 8'd255, 8'd0, 8'd0};
  localparam logic [3:0]   TCP   = 4'b0110;
  localparam logic [63:0]  SPORT = {16'd4004, 16'd3003, 16'd2002, 16'd1001};
  localparam logic [127:0] DIP   = {8'd10, 8'd0, 8'd0, 8'd4, 8'd10, 8'd0, 8'd0, 8'd3,
                                    8'd10, 8'd0, 8'd0, 8'd2, 8'd10, 8'd0, 8'd0, 8'd1};
  localparam logic [63:0]  DPORT = {16'd40, 16'd30, 16'd20, 16'd10};
  localparam logic [31:0]  TOS   = {8'd8, 8'd4, 8'd2, 8'd1};
  localparam logic [63:0]  MSS   = {16'd1024, 16'd512, 16'd256, 16'd128};

  logic clk = 1'b0;
  always #10 clk = ~clk;
  logic [7:0]  addr = '0;
  logic [22:0] data;

  net_data_rom #(
    .MAC(MAC), .SRC_IP(IP), .GATEWAY(GW), .SUBNET(SN), .IRTR(16'd4000), .RTR(8'd5),
    .CH_TCP(TCP), .CH_SPORT(SPORT), .CH_DIP(DIP), .CH_DPORT(DPORT), .CH_TOS(TOS), .CH_MSS(MSS),
    .RP_CH(2), .ALT_TCP(1'b0), .ALT_MSS(16'd1024)
  ) dut (.*);

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

  logic [22:0] exp [256];
  int n = 0;
  function automatic void put(input int a, input logic [7:0] d);
    exp[n] = {15'(a), d};
    n++;
  endfunction
  function automatic void section(input int c, input bit tcp, input logic [15:0] mss);
    int base;
    base = A_CH_BASE + c * CH_STRIDE;
    put(base + O_SOPR, tcp ? 8'h01 : 8'h02);
    put(base + O_SPORT, SPORT[16*c+8 +: 8]);     put(base + O_SPORT + 1, SPORT[16*c +: 8]);
    for (int i = 0; i < 4; i++) put(base + O_DIR + i, DIP[32*c + 24 - 8*i +: 8]);
    put(base + O_DPORT, DPORT[16*c+8 +: 8]);     put(base + O_DPORT + 1, DPORT[16*c +: 8]);
    put(base + O_TOS, TOS[8*c +: 8]);
    put(base + O_MSSR, mss[15:8]);               put(base + O_MSSR + 1, mss[7:0]);
    for (int i = 0; i < 4; i++) put(A_PTR_BASE + c * PTR_STRIDE + 4 * P_TW + i, 8'h00);
    for (int i = 0; i < 4; i++) put(A_PTR_BASE + c * PTR_STRIDE + 4 * P_RR + i, 8'h00);
    put(c, 8'h02);                                 // socket initialise command
  endfunction

  initial begin
    int order [256];
    for (int i = 0; i < 256; i++) exp[i] = '0;
    for (int i = 0; i < 6; i++) put(A_SHAR + i, MAC[40 - 8*i +: 8]);
    for (int i = 0; i < 4; i++) put(A_SIPR + i, IP[24 - 8*i +: 8]);
    for (int i = 0; i < 4; i++) put(A_GAR + i, GW[24 - 8*i +: 8]);
    for (int i = 0; i < 4; i++) put(A_SMR + i, SN[24 - 8*i +: 8]);
    put(A_IRTR, 8'h0F); put(A_IRTR + 1, 8'hA0);    // 4000
    put(A_RTR, 8'd5);
    put(A_RMSR, 8'h55); put(A_TMSR, 8'h55);
    put(A_IMR, 8'hFF);
    for (int c = 0; c < 4; c++) section(c, TCP[c], MSS[16*c +: 16]);
    section(2, 1'b0, 16'd1024);
    check(n == 129, "expected table length");

    for (int i = 0; i < 256; i++) order[i] = i;
    order.shuffle();
    for (int i = 0; i < 256; i++) begin
      @(negedge clk);
      addr = 8'(order[i]);
      @(posedge clk);
      #1;
      check(data == exp[order[i]], $sformatf("word %0d: %06h expected %06h", order[i], data, exp[order[i]]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
