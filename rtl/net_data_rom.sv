// net_data_rom: the "network data" block RAM that holds everything written
// into the W3100A when the controller starts or a channel is re-initialised.
//
// Each word is one register write, {address[14:0], data[7:0]}. The ROM is
// split into sections that the initialisation state machine plays back:
//
//   section 0       system registers: MAC address (SHAR), source IP, gateway,
//                   subnet mask, retry time and count, buffer split (2 KB per
//                   channel both ways) and IMR = 0xFF (all interrupts on).
//   sections 1..4   channel 0..3: protocol and options (SOPR), source port,
//                   destination IP and port, TOS, maximum segment size,
//                   transmit write / receive read pointers cleared to 0, and
//                   finally a socket-initialise command for the channel.
//   section 5       the alternative configuration of the reconfigurable
//                   channel RP_CH (protocol ALT_TCP, segment size ALT_MSS),
//                   i.e. what its partial bitstream's block RAM holds.
//
// The list of registers follows the controller's description; the values
// that the description does not print (MAC, gateway, mask, retry settings,
// destination address) and the register map are this design's own. The
// contents are a function of the parameters, evaluated on the registered
// read address, so synthesis turns them into a constant table.
//
// Interface: registered read, addr -> data one clock later. Section 0 is 24
// words long, every other section 21, in the order listed above.
module net_data_rom
  import nc_pkg::*;
#(
  parameter logic [47:0]   MAC       = 48'h00_01_02_00_00_01,
  parameter logic [31:0]   SRC_IP    = {8'd10, 8'd0, 8'd0, 8'd91},
  parameter logic [31:0]   GATEWAY   = {8'd10, 8'd0, 8'd0, 8'd1},
  parameter logic [31:0]   SUBNET    = {8'd255, 8'd255, 8'd255, 8'd0},
  parameter logic [15:0]   IRTR      = 16'd2000,     // 200 ms in 100 us units
  parameter logic [7:0]    RTR       = 8'd8,
  parameter logic [3:0]    CH_TCP    = 4'b1000,      // three UDP channels, one TCP
  parameter logic [31:0]   CH_OPT    = '0,           // SOPR option bits, 8 per channel
  parameter logic [63:0]   CH_SPORT  = {16'd10004, 16'd10003, 16'd10002, 16'd10001},
  parameter logic [127:0]  CH_DIP    = {4{8'd10, 8'd0, 8'd0, 8'd2}},
  parameter logic [63:0]   CH_DPORT  = {4{16'd10000}},
  parameter logic [31:0]   CH_TOS    = '0,
  parameter logic [63:0]   CH_MSS    = {4{16'd128}},
  parameter int unsigned   RP_CH     = 3,
  parameter logic          ALT_TCP   = 1'b0,
  parameter logic [15:0]   ALT_MSS   = 16'd128
) (
  input  logic        clk,
  input  logic [7:0]  addr,
  output logic [22:0] data
);

  localparam int unsigned SYS_LEN = 24;
  localparam int unsigned SEC_LEN = 21;
  localparam int unsigned WORDS   = SYS_LEN + 5 * SEC_LEN;   // 129

  typedef logic [22:0] word_t;

  function automatic word_t w(input logic [14:0] a, input logic [7:0] d);
    return {a, d};
  endfunction

  // word k (0..20) of the section of channel c
  function automatic word_t channel_word(input logic [1:0] c, input logic tcp,
                                         input logic [15:0] mss, input int unsigned k);
    logic [7:0]  opt;
    logic [15:0] sp, dp;
    logic [31:0] dip;
    opt = CH_OPT[8*c +: 8];
    sp  = CH_SPORT[16*c +: 16];
    dp  = CH_DPORT[16*c +: 16];
    dip = CH_DIP[32*c +: 32];
    if (k == 0)       return w(chreg_addr(c, O_SOPR), (tcp ? SOPR_TCP : SOPR_UDP) | opt);
    else if (k <= 2)  return w(chreg_addr(c, O_SPORT + k - 1), sp[15 - 8*(k-1) -: 8]);
    else if (k <= 6)  return w(chreg_addr(c, O_DIR + k - 3), dip[31 - 8*(k-3) -: 8]);
    else if (k <= 8)  return w(chreg_addr(c, O_DPORT + k - 7), dp[15 - 8*(k-7) -: 8]);
    else if (k == 9)  return w(chreg_addr(c, O_TOS), CH_TOS[8*c +: 8]);
    else if (k <= 11) return w(chreg_addr(c, O_MSSR + k - 10), mss[15 - 8*(k-10) -: 8]);
    else if (k <= 15) return w(ptr_addr(c, P_TW, 2'(k - 12)), 8'h00);
    else if (k <= 19) return w(ptr_addr(c, P_RR, 2'(k - 16)), 8'h00);
    else              return w(cr_addr(c), CR_SOCK_INIT);
  endfunction

  // word idx of the whole ROM
  function automatic word_t rom_word(input int unsigned idx);
    int unsigned s, k;
    if (idx < 6)        return w(A_SHAR + 15'(idx),      MAC[47 - 8*idx -: 8]);
    else if (idx < 10)  return w(A_SIPR + 15'(idx - 6),  SRC_IP[31 - 8*(idx-6) -: 8]);
    else if (idx < 14)  return w(A_GAR  + 15'(idx - 10), GATEWAY[31 - 8*(idx-10) -: 8]);
    else if (idx < 18)  return w(A_SMR  + 15'(idx - 14), SUBNET[31 - 8*(idx-14) -: 8]);
    else if (idx == 18) return w(A_IRTR,     IRTR[15:8]);
    else if (idx == 19) return w(A_IRTR + 1, IRTR[7:0]);
    else if (idx == 20) return w(A_RTR,      RTR);
    else if (idx == 21) return w(A_RMSR,     8'h55);   // 2 KB for each of the four channels
    else if (idx == 22) return w(A_TMSR,     8'h55);
    else if (idx == 23) return w(A_IMR,      8'hFF);
    else if (idx < WORDS) begin
      s = (idx - SYS_LEN) / SEC_LEN;
      k = (idx - SYS_LEN) % SEC_LEN;
      if (s < 4) return channel_word(2'(s), CH_TCP[s], CH_MSS[16*s +: 16], k);
      else       return channel_word(2'(RP_CH), ALT_TCP, ALT_MSS, k);
    end
    return '0;
  endfunction

  always_ff @(posedge clk) data <= rom_word(int'(addr));

endmodule
