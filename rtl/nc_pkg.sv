// nc_pkg: constants and types shared by the network controller.
//
// The controller talks to a W3100A TCP/IP offload chip through an 8-bit
// data, 15-bit address memory bus. The top-level memory map (control
// registers at 0x0000, pointer registers at 0x0100-0x01FF, transmit buffer
// at 0x4000-0x5FFF, receive buffer at 0x6000-0x7FFF, 2 KB per channel when
// four channels share the 8 KB) and the values CR0=0x01 / ISR0=0x01 for
// system initialisation and IMR=0xFF follow the description of the chip.
// The byte offsets of the individual registers, the command and status bit
// positions and the socket-state codes are this design's own choices: they
// are collected here so that a different register map only needs this file.
package nc_pkg;

  localparam int unsigned CH_BUF     = 2048;   // bytes of tx (and rx) buffer per channel

  // ---- memory map -------------------------------------------------------
  localparam logic [14:0] A_CR_BASE   = 15'h0000; // command register, one per channel
  localparam logic [14:0] A_ISR_BASE  = 15'h0004; // interrupt status, one per channel
  localparam logic [14:0] A_IR        = 15'h0008; // which channel interrupted
  localparam logic [14:0] A_IMR       = 15'h0009; // interrupt mask
  localparam logic [14:0] A_GAR       = 15'h0080; // gateway, 4 bytes
  localparam logic [14:0] A_SMR       = 15'h0084; // subnet mask, 4 bytes
  localparam logic [14:0] A_SHAR      = 15'h0088; // MAC address, 6 bytes
  localparam logic [14:0] A_SIPR      = 15'h008E; // source IP, 4 bytes
  localparam logic [14:0] A_IRTR      = 15'h0092; // initial retry time, 2 bytes
  localparam logic [14:0] A_RTR       = 15'h0094; // retry count
  localparam logic [14:0] A_RMSR      = 15'h0095; // rx buffer split
  localparam logic [14:0] A_TMSR      = 15'h0096; // tx buffer split
  localparam logic [14:0] A_CH_BASE   = 15'h00A0; // channel register blocks
  localparam int unsigned CH_STRIDE   = 'h18;
  // offsets inside a channel register block
  localparam int unsigned O_SSR   = 0;   // socket state
  localparam int unsigned O_SOPR  = 1;   // socket option / protocol
  localparam int unsigned O_DIR   = 2;   // destination IP, 4 bytes
  localparam int unsigned O_DPORT = 6;   // destination port, 2 bytes
  localparam int unsigned O_SPORT = 8;   // source port, 2 bytes
  localparam int unsigned O_TOS   = 11;  // IP type of service
  localparam int unsigned O_MSSR  = 12;  // maximum segment size, 2 bytes

  localparam logic [14:0] A_PTR_BASE  = 15'h0100; // pointer registers
  localparam int unsigned PTR_STRIDE  = 'h20;
  // pointer index inside a channel's pointer block (4 bytes each, MSB first);
  // the shadow register of pointer k is at +0x18+k
  typedef enum logic [2:0] {P_RW = 3'd0, P_RR = 3'd1, P_TA = 3'd2, P_TW = 3'd3, P_TR = 3'd4} ptr_e;
  localparam int unsigned O_SHADOW = 'h18;

  localparam logic [14:0] A_TXBUF = 15'h4000;
  localparam logic [14:0] A_RXBUF = 15'h6000;

  // ---- command register bits (CR) and interrupt status bits (ISR) --------
  localparam logic [7:0] CR_SYS_INIT  = 8'h01;
  localparam logic [7:0] CR_SOCK_INIT = 8'h02;
  localparam logic [7:0] CR_CONNECT   = 8'h04;
  localparam logic [7:0] CR_LISTEN    = 8'h08;
  localparam logic [7:0] CR_CLOSE     = 8'h10;
  localparam logic [7:0] CR_SEND      = 8'h20;
  localparam logic [7:0] CR_RECV      = 8'h40;
  localparam logic [7:0] ISR_INIT_OK  = 8'h01;
  localparam logic [7:0] ISR_SEND     = 8'h20;  // set while a send command is pending
  localparam logic [7:0] ISR_RECV     = 8'h40;  // data received

  // socket option / protocol register
  localparam logic [7:0] SOPR_TCP      = 8'h01;
  localparam logic [7:0] SOPR_UDP      = 8'h02;
  localparam logic [7:0] SOPR_NDACK    = 8'h20;  // no delayed ACK
  localparam logic [7:0] SOPR_SWS      = 8'h40;  // silly window syndrome avoidance

  // socket states reported in SSR, named after the TCP connection states
  typedef enum logic [7:0] {
    SS_CLOSED      = 8'h00,
    SS_ARP_WAIT    = 8'h01,
    SS_SYN_WAIT    = 8'h02,   // passive open: listening
    SS_SYNACK_WAIT = 8'h03,   // active open: SYN sent
    SS_ACK_WAIT    = 8'h05,   // passive open: SYN ACK sent
    SS_ESTABLISHED = 8'h06,
    SS_PEER_FIN    = 8'h07,   // FIN received from the peer
    SS_FINACK_WAIT = 8'h09,   // active close: FIN sent
    SS_FIN_WAIT    = 8'h0A,   // active close: ACK received, peer still sending
    SS_LAST_ACK    = 8'h0B,   // passive close: FIN (ACK) sent
    SS_INIT        = 8'h0E,
    SS_UDP         = 8'h0F
  } sock_state_e;

  // ---- one access on the W3100A bus, as a master asks for it -------------
  // A master raises req with we/addr/wdata and holds them until it sees
  // done; rdata is valid with done for a read.
  typedef struct packed {
    logic        req;
    logic        we;
    logic [14:0] addr;
    logic [7:0]  wdata;
  } bus_req_t;

  typedef struct packed {
    logic       done;
    logic [7:0] rdata;
  } bus_rsp_t;

  // ---- address helpers ---------------------------------------------------
  function automatic logic [14:0] cr_addr(input logic [1:0] ch);
    return A_CR_BASE + 15'(ch);
  endfunction
  function automatic logic [14:0] isr_addr(input logic [1:0] ch);
    return A_ISR_BASE + 15'(ch);
  endfunction
  function automatic logic [14:0] chreg_addr(input logic [1:0] ch, input int unsigned off);
    return A_CH_BASE + 15'(int'(ch) * CH_STRIDE + off);
  endfunction
  function automatic logic [14:0] ptr_addr(input logic [1:0] ch, input ptr_e p, input logic [1:0] byte_i);
    return A_PTR_BASE + 15'(int'(ch) * PTR_STRIDE + int'(p) * 4 + int'(byte_i));
  endfunction
  function automatic logic [14:0] shadow_addr(input logic [1:0] ch, input ptr_e p);
    return A_PTR_BASE + 15'(int'(ch) * PTR_STRIDE + O_SHADOW + int'(p));
  endfunction
  function automatic logic [14:0] txbuf_addr(input logic [1:0] ch, input logic [10:0] off);
    return A_TXBUF + {2'b00, ch, off};
  endfunction
  function automatic logic [14:0] rxbuf_addr(input logic [1:0] ch, input logic [10:0] off);
    return A_RXBUF + {2'b00, ch, off};
  endfunction

endpackage
