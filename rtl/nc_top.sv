// nc_top: four-channel TCP/UDP network controller for a W3100A-based
// Ethernet module, with one channel that can be reconfigured at run time.
//
// The W3100A chip (on the IIM7010 module, with its PHY) already implements
// the MAC, IP, ARP, ICMP and most of TCP and UDP, so the FPGA side only has
// to initialise it, open and close TCP connections and move data between the
// application and the chip's buffers. The blocks, all sharing one 8-bit data
// / 15-bit address memory bus to the chip:
//
//   init_fsm + net_data_rom    system and channel set-up from a table
//   tcp_connect_fsm            active / passive TCP open
//   tcp_disconnect_fsm         active / passive TCP close
//   channel_arbiter + tx_fsm   round-robin transmission from 4 transmit FIFOs
//   rx_fsm + channel_classifier interrupt-driven reception into 4 receive FIFOs
//   bus_arbiter + w3100a_bus_if one access at a time, 9-clock reads and
//                              8-clock writes at 50 MHz
//   reconfig_ctrl              isolation and re-initialisation of the
//                              reconfigurable channel RP_CH
//   rx_timer                   throughput measurement on received data
//
// By default channels 0-2 run UDP and channel 3 TCP (active open), as in the
// reconfiguration demonstration where the TCP channel's partial bitstream is
// swapped for a UDP one (ALT_TCP = 0). The structure follows the controller's
// block diagram; defaults that the description does not give (FIFO depth,
// addresses, ports, timeouts) are this design's.
//
// Ports: the W3100A pins (w3_*; the data bus split into in/out/enable, CS,
// RD, WR and INT active low, RST active high); per channel an application
// transmit FIFO write port and receive FIFO read port; open_req / close_req
// for TCP channels; rp_busy / rp_variant from the configuration side;
// status and one-clock event pulses (see ev_e in the body for the order).
module nc_top
  import nc_pkg::*;
#(
  parameter logic [47:0]   MAC        = 48'h00_01_02_00_00_01,
  parameter logic [31:0]   SRC_IP     = {8'd10, 8'd0, 8'd0, 8'd91},
  parameter logic [31:0]   GATEWAY    = {8'd10, 8'd0, 8'd0, 8'd1},
  parameter logic [31:0]   SUBNET     = {8'd255, 8'd255, 8'd255, 8'd0},
  parameter logic [3:0]    CH_TCP     = 4'b1000,
  parameter logic [3:0]    CH_ACTIVE  = 4'b1111,
  parameter logic [63:0]   CH_SPORT   = {16'd10004, 16'd10003, 16'd10002, 16'd10001},
  parameter logic [127:0]  CH_DIP     = {4{8'd10, 8'd0, 8'd0, 8'd2}},
  parameter logic [63:0]   CH_DPORT   = {4{16'd10000}},
  parameter logic [63:0]   CH_MSS     = {4{16'd128}},
  parameter int unsigned   RP_CH      = 3,
  parameter logic          ALT_TCP    = 1'b0,
  parameter logic [15:0]   ALT_MSS    = 16'd128,
  parameter int unsigned   FIFO_DEPTH = 256,
  parameter int unsigned   MAX_BURST  = 2048,
  parameter int unsigned   TCP_TIMEOUT = 50000,
  parameter int unsigned   RETRY_GAP  = 5000,
  parameter int unsigned   MEAS_IDLE  = 50_000_000
) (
  input  logic        clk,
  input  logic        rst,
  // W3100A
  output logic        w3_rst,
  input  logic        w3_int_n,
  output logic [14:0] w3_addr,
  output logic [7:0]  w3_data_o,
  output logic        w3_data_oe,
  input  logic [7:0]  w3_data_i,
  output logic        w3_cs_n,
  output logic        w3_rd_n,
  output logic        w3_wr_n,
  // application: transmit FIFOs
  input  logic [3:0]  tx_wr,
  input  logic [7:0]  tx_din [4],
  output logic [3:0]  tx_full,
  // application: receive FIFOs
  input  logic [3:0]  rx_rd,
  output logic [7:0]  rx_dout [4],
  output logic [3:0]  rx_empty,
  // TCP connection control
  input  logic [3:0]  open_req,
  input  logic [3:0]  close_req,
  // partial reconfiguration of channel RP_CH
  input  logic        rp_busy,
  input  logic        rp_variant,
  // status
  output logic        init_done,
  output logic [3:0]  ch_is_tcp,
  output logic [3:0]  tx_up,
  output logic [3:0]  rx_up,
  output logic [15:0] rx_dropped,
  output logic [31:0] timestamp,
  output logic        meas_valid,
  output logic [31:0] meas_clocks,
  output logic [31:0] meas_bytes,
  output logic [15:0] events
);

  // order of the event bits
  typedef enum int unsigned {
    EV_BUF_FULL, EV_SEND_WAIT, EV_SEND, EV_BURST_LIMIT, EV_RX_STALL, EV_RECV,
    EV_OPEN, EV_CONN_TIMEOUT, EV_CONN_RESET, EV_ACTIVE_CLOSE, EV_PASSIVE_CLOSE,
    EV_HALF_CLOSED, EV_FIN_WAIT, EV_DISC_TIMEOUT, EV_RECONFIG, EV_SPARE
  } ev_e;

  // ---- bus masters ----------------------------------------------------------
  localparam int unsigned M_INIT = 0, M_CONN = 1, M_TX = 2, M_RX = 3, M_DISC = 4;
  bus_req_t m_req [5];
  bus_rsp_t m_rsp [5];
  bus_req_t s_req;
  bus_rsp_t s_rsp;

  bus_arbiter #(.N(5)) u_bus_arb (
    .clk, .rst, .m_req, .m_rsp, .s_req, .s_rsp
  );

  w3100a_bus_if u_bus (
    .clk, .rst, .req(s_req), .rsp(s_rsp), .busy(),
    .addr_o(w3_addr), .data_o(w3_data_o), .data_oe(w3_data_oe), .data_i(w3_data_i),
    .cs_n(w3_cs_n), .rd_n(w3_rd_n), .wr_n(w3_wr_n)
  );

  // ---- initialisation ---------------------------------------------------------
  logic [7:0]  rom_addr;
  logic [22:0] rom_data;
  logic        reinit_req, reinit_alt, reinit_busy, reinit_done;

  net_data_rom #(
    .MAC(MAC), .SRC_IP(SRC_IP), .GATEWAY(GATEWAY), .SUBNET(SUBNET),
    .CH_TCP(CH_TCP), .CH_SPORT(CH_SPORT), .CH_DIP(CH_DIP), .CH_DPORT(CH_DPORT),
    .CH_MSS(CH_MSS), .RP_CH(RP_CH), .ALT_TCP(ALT_TCP), .ALT_MSS(ALT_MSS)
  ) u_rom (
    .clk, .addr(rom_addr), .data(rom_data)
  );

  init_fsm #(.RP_CH(RP_CH)) u_init (
    .clk, .rst, .m_req(m_req[M_INIT]), .m_rsp(m_rsp[M_INIT]),
    .rom_addr, .rom_data, .w3_rst, .init_done,
    .reinit_req, .reinit_alt, .reinit_busy, .reinit_done
  );

  // ---- reconfigurable channel ---------------------------------------------------
  logic rp_isolate, rp_tcp, ev_reconfig;

  reconfig_ctrl #(.BASE_TCP(CH_TCP[RP_CH]), .ALT_TCP(ALT_TCP)) u_rp (
    .clk, .rst, .init_done, .rp_busy, .rp_variant,
    .reinit_req, .reinit_alt, .reinit_done,
    .isolate(rp_isolate), .rp_tcp, .ev_reconfig
  );

  logic [3:0] iso;
  always_comb begin
    iso = '0;
    iso[RP_CH] = rp_isolate;
    ch_is_tcp = CH_TCP;
    ch_is_tcp[RP_CH] = rp_tcp;
  end

  // ---- TCP connection management --------------------------------------------
  logic [3:0] est, closed, tx_allow, rx_allow;
  logic       ev_open, ev_conn_timeout, ev_conn_reset;
  logic       ev_active_close, ev_passive_close, ev_half_closed, ev_fin_wait, ev_disc_timeout;
  logic [3:0] tx_empty;

  tcp_connect_fsm #(.TIMEOUT(TCP_TIMEOUT), .RETRY_GAP(RETRY_GAP)) u_conn (
    .clk, .rst, .enable(init_done), .ch_tcp(ch_is_tcp & ~iso), .ch_active(CH_ACTIVE),
    .open_req(open_req & ~iso), .closed(closed | iso), .est,
    .m_req(m_req[M_CONN]), .m_rsp(m_rsp[M_CONN]),
    .ev_open, .ev_timeout(ev_conn_timeout), .ev_reset(ev_conn_reset)
  );

  tcp_disconnect_fsm #(.TIMEOUT(TCP_TIMEOUT)) u_disc (
    .clk, .rst, .enable(init_done), .est(est & ch_is_tcp & ~iso), .close_req,
    .more_data(~tx_empty & ~close_req), .tx_allow, .rx_allow, .closed,
    .m_req(m_req[M_DISC]), .m_rsp(m_rsp[M_DISC]),
    .ev_active_close, .ev_passive_close, .ev_half_closed, .ev_fin_wait,
    .ev_timeout(ev_disc_timeout)
  );

  always_comb begin
    for (int c = 0; c < 4; c++) begin
      tx_up[c] = init_done && !iso[c] && (ch_is_tcp[c] ? tx_allow[c] : 1'b1);
      rx_up[c] = init_done && !iso[c] && (ch_is_tcp[c] ? rx_allow[c] : 1'b1);
    end
  end

  // ---- transmit path ------------------------------------------------------------
  logic [7:0] txf_dout [4];
  logic [3:0] txf_rd;
  logic       arb_valid, arb_pop, arb_flush, arb_send_done, ev_burst_limit;
  logic [7:0] arb_data;
  logic [1:0] arb_ch;
  logic       ev_buf_full, ev_send_wait, ev_send;

  for (genvar c = 0; c < 4; c++) begin : g_txf
    sync_fifo #(.WIDTH(8), .DEPTH(FIFO_DEPTH)) u_txf (
      .clk, .rst, .wr_en(tx_wr[c]), .din(tx_din[c]), .full(tx_full[c]),
      .rd_en(txf_rd[c]), .dout(txf_dout[c]), .empty(tx_empty[c]), .count()
    );
  end

  channel_arbiter #(.NCH(4), .MAX_BURST(MAX_BURST)) u_chan_arb (
    .clk, .rst, .chan_en(tx_up), .fifo_empty(tx_empty), .fifo_dout(txf_dout), .fifo_rd(txf_rd),
    .valid(arb_valid), .data(arb_data), .ch(arb_ch), .pop(arb_pop),
    .flush(arb_flush), .send_done(arb_send_done), .ev_burst_limit
  );

  tx_fsm u_tx (
    .clk, .rst, .enable(init_done), .ch_tcp(ch_is_tcp),
    .valid(arb_valid), .data(arb_data), .ch(arb_ch), .pop(arb_pop),
    .flush(arb_flush), .send_done(arb_send_done),
    .m_req(m_req[M_TX]), .m_rsp(m_rsp[M_TX]),
    .ev_buf_full, .ev_send_wait, .ev_send
  );

  // ---- receive path -------------------------------------------------------------
  logic       rxs_valid, rxs_full;
  logic [7:0] rxs_data;
  logic [1:0] rxs_ch;
  logic [3:0] rxf_full, rxf_wr;
  logic [7:0] rxf_din;
  logic       ev_rx_stall, ev_recv;

  rx_fsm u_rx (
    .clk, .rst, .enable(init_done), .int_n(w3_int_n), .rx_en(rx_up),
    .out_valid(rxs_valid), .out_data(rxs_data), .out_ch(rxs_ch), .fifo_full(rxs_full),
    .m_req(m_req[M_RX]), .m_rsp(m_rsp[M_RX]),
    .ev_rx_stall, .ev_recv
  );

  channel_classifier #(.NCH(4)) u_class (
    .clk, .rst, .rx_en(rx_up), .in_valid(rxs_valid), .in_data(rxs_data), .in_ch(rxs_ch),
    .in_full(rxs_full), .fifo_full(rxf_full), .fifo_wr(rxf_wr), .fifo_din(rxf_din),
    .drop_cnt(rx_dropped)
  );

  for (genvar c = 0; c < 4; c++) begin : g_rxf
    sync_fifo #(.WIDTH(8), .DEPTH(FIFO_DEPTH)) u_rxf (
      .clk, .rst, .wr_en(rxf_wr[c]), .din(rxf_din), .full(rxf_full[c]),
      .rd_en(rx_rd[c]), .dout(rx_dout[c]), .empty(rx_empty[c]), .count()
    );
  end

  rx_timer #(.IDLE_TIMEOUT(MEAS_IDLE)) u_meas (
    .clk, .rst, .rx_valid(rxs_valid && rx_up[rxs_ch]), .now(timestamp),
    .result_valid(meas_valid), .elapsed(meas_clocks), .bytes(meas_bytes)
  );

  // ---- events -----------------------------------------------------------------
  always_comb begin
    events = '0;
    events[EV_BUF_FULL]      = ev_buf_full;
    events[EV_SEND_WAIT]     = ev_send_wait;
    events[EV_SEND]          = ev_send;
    events[EV_BURST_LIMIT]   = ev_burst_limit;
    events[EV_RX_STALL]      = ev_rx_stall;
    events[EV_RECV]          = ev_recv;
    events[EV_OPEN]          = ev_open;
    events[EV_CONN_TIMEOUT]  = ev_conn_timeout;
    events[EV_CONN_RESET]    = ev_conn_reset;
    events[EV_ACTIVE_CLOSE]  = ev_active_close;
    events[EV_PASSIVE_CLOSE] = ev_passive_close;
    events[EV_HALF_CLOSED]   = ev_half_closed;
    events[EV_FIN_WAIT]      = ev_fin_wait;
    events[EV_DISC_TIMEOUT]  = ev_disc_timeout;
    events[EV_RECONFIG]      = ev_reconfig;
  end

  wire unused_ok = reinit_busy;

endmodule
