// tcp_connect_fsm: opens the TCP connections of the TCP channels.
//
// The W3100A exchanges the SYN / SYN ACK / ACK packets itself; this machine
// tells it what to do and follows the connection through the chip's socket
// state register (SSR), adding the timeouts. It keeps one connection state
// per channel and visits the TCP channels in turn, one bus action per visit,
// so a channel waiting for a peer never blocks the others.
//
// Active open (ch_active = 1), from Connection Closed: socket initialise and
// connect command -> ARP Wait (an ARP request is out) -> SYN ACK Wait (ARP
// reply came, SYN sent) -> Connection Established (SYN ACK came, ACK sent).
// If ARP Wait or SYN ACK Wait lasts longer than TIMEOUT clocks, the machine
// closes the socket and returns to Connection Closed; a reset from the peer
// (the chip reports the socket closed) also returns there. A closed channel
// whose open_req is still high is retried after RETRY_GAP clocks.
//
// Passive open (ch_active = 0): socket initialise and listen command -> SYN
// Wait (no timeout) -> ACK Wait (SYN came, SYN ACK sent) -> Connection
// Established (ACK came). If ACK Wait times out the machine issues listen
// again and goes back to SYN Wait.
//
// The states and transitions follow the controller's description of the
// connection process; the SSR codes, the timeout lengths and the
// per-channel polling are this design's choices.
//
// Interface: ch_tcp / ch_active per channel; open_req per channel (level);
// closed from the disconnect machine returns an established channel to
// Connection Closed; est per channel (level); bus master port. Events pulse
// one clock: ev_open (connection established), ev_timeout, ev_reset.
module tcp_connect_fsm
  import nc_pkg::*;
#(
  parameter int unsigned TIMEOUT   = 50000,   // 1 ms at 50 MHz
  parameter int unsigned RETRY_GAP = 5000
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        enable,
  input  logic [3:0]  ch_tcp,
  input  logic [3:0]  ch_active,
  input  logic [3:0]  open_req,
  input  logic [3:0]  closed,
  output logic [3:0]  est,
  output bus_req_t    m_req,
  input  bus_rsp_t    m_rsp,
  output logic        ev_open,
  output logic        ev_timeout,
  output logic        ev_reset
);

  typedef enum logic [2:0] {
    C_CLOSED, C_ARP_WAIT, C_SYNACK_WAIT, C_SYN_WAIT, C_ACK_WAIT, C_ESTABLISHED
  } conn_e;

  typedef enum logic [2:0] {S_PICK, S_INIT, S_OPEN, S_POLL, S_CLOSE} state_e;

  conn_e       cst   [4];
  logic [31:0] timer [4];
  state_e      state;
  logic [1:0]  cur;

  function automatic logic timed(input conn_e c);
    return c == C_ARP_WAIT || c == C_SYNACK_WAIT || c == C_ACK_WAIT || c == C_CLOSED;
  endfunction

  always_comb
    for (int c = 0; c < 4; c++) est[c] = (cst[c] == C_ESTABLISHED);

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int c = 0; c < 4; c++) begin
        cst[c]   <= C_CLOSED;
        timer[c] <= 32'(RETRY_GAP);      // first attempt needs no wait
      end
      state      <= S_PICK;
      cur        <= '0;
      m_req      <= '0;
      ev_open    <= 1'b0;
      ev_timeout <= 1'b0;
      ev_reset   <= 1'b0;
    end else begin
      ev_open    <= 1'b0;
      ev_timeout <= 1'b0;
      ev_reset   <= 1'b0;
      for (int c = 0; c < 4; c++) begin
        if (timed(cst[c]) && timer[c] != '1) timer[c] <= timer[c] + 1'b1;
        if (closed[c] && cst[c] == C_ESTABLISHED) begin
          cst[c]   <= C_CLOSED;
          timer[c] <= '0;
        end
      end
      unique case (state)
        S_PICK: begin
          if (enable && ch_tcp[cur]) begin
            if (cst[cur] == C_CLOSED && open_req[cur] && timer[cur] >= 32'(RETRY_GAP))
              state <= S_INIT;
            else if (cst[cur] != C_CLOSED && cst[cur] != C_ESTABLISHED)
              state <= S_POLL;
            else
              cur <= cur + 1'b1;
          end else begin
            cur <= cur + 1'b1;
          end
        end
        S_INIT: begin                       // socket initialise
          if (!m_req.req) begin
            m_req <= '{req: 1'b1, we: 1'b1, addr: cr_addr(cur), wdata: CR_SOCK_INIT};
          end else if (m_rsp.done) begin
            m_req.req <= 1'b0;
            state     <= S_OPEN;
          end
        end
        S_OPEN: begin                       // connect or listen
          if (!m_req.req) begin
            m_req <= '{req: 1'b1, we: 1'b1, addr: cr_addr(cur),
                       wdata: ch_active[cur] ? CR_CONNECT : CR_LISTEN};
          end else if (m_rsp.done) begin
            m_req.req  <= 1'b0;
            cst[cur]   <= ch_active[cur] ? C_ARP_WAIT : C_SYN_WAIT;
            timer[cur] <= '0;
            state      <= S_PICK;
            cur        <= cur + 1'b1;
          end
        end
        S_POLL: begin                       // read SSR and follow it
          if (!m_req.req) begin
            m_req <= '{req: 1'b1, we: 1'b0, addr: chreg_addr(cur, O_SSR), wdata: 8'h00};
          end else if (m_rsp.done) begin
            m_req.req <= 1'b0;
            state     <= S_PICK;
            cur       <= cur + 1'b1;
            case (m_rsp.rdata)
              SS_ESTABLISHED: begin
                cst[cur] <= C_ESTABLISHED;
                ev_open  <= 1'b1;
              end
              SS_SYNACK_WAIT: if (cst[cur] == C_ARP_WAIT) begin
                cst[cur]   <= C_SYNACK_WAIT;
                timer[cur] <= '0;
              end
              SS_ACK_WAIT: if (cst[cur] == C_SYN_WAIT) begin
                cst[cur]   <= C_ACK_WAIT;
                timer[cur] <= '0;
              end
              SS_CLOSED, SS_INIT: begin     // reset from the peer, or chip gave up
                ev_reset <= 1'b1;
                if (ch_active[cur]) begin
                  cst[cur]   <= C_CLOSED;
                  timer[cur] <= '0;
                end else begin
                  state <= S_INIT;          // listen again
                  cur   <= cur;
                end
              end
              default: ;
            endcase
            if (m_rsp.rdata != SS_ESTABLISHED && m_rsp.rdata != SS_CLOSED && m_rsp.rdata != SS_INIT &&
                (cst[cur] == C_ARP_WAIT || cst[cur] == C_SYNACK_WAIT || cst[cur] == C_ACK_WAIT) &&
                timer[cur] >= 32'(TIMEOUT) &&
                !(m_rsp.rdata == SS_SYNACK_WAIT && cst[cur] == C_ARP_WAIT) &&
                !(m_rsp.rdata == SS_ACK_WAIT && cst[cur] == C_SYN_WAIT)) begin
              ev_timeout <= 1'b1;
              cur        <= cur;
              state      <= ch_active[cur] ? S_CLOSE : S_OPEN;
              if (!ch_active[cur]) cst[cur] <= C_SYN_WAIT;
            end
          end
        end
        S_CLOSE: begin                      // give up: close the socket
          if (!m_req.req) begin
            m_req <= '{req: 1'b1, we: 1'b1, addr: cr_addr(cur), wdata: CR_CLOSE};
          end else if (m_rsp.done) begin
            m_req.req  <= 1'b0;
            cst[cur]   <= C_CLOSED;
            timer[cur] <= '0;
            state      <= S_PICK;
            cur        <= cur + 1'b1;
          end
        end
        default: state <= S_PICK;
      endcase
    end
  end

endmodule
