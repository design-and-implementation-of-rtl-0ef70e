// tcp_disconnect_fsm: closes the TCP connections, actively or passively.
//
// As with opening, the W3100A exchanges the FIN / ACK packets; this machine
// commands it and follows the socket state register (SSR). It keeps one
// disconnection state per channel, visits the established TCP channels in
// turn (one bus action per visit) and tells the rest of the controller
// which directions of each connection may still carry data:
//
//   Open         connection established, both directions run.
//   Active close (close_req from the application): close command, the chip
//                sends FIN -> FIN ACK Wait (receive still runs, transmit
//                stops). FIN ACK from the peer (socket closed) -> Closed;
//                only an ACK (peer still sending) -> FIN Wait, where
//                reception goes on until the peer's FIN closes the socket;
//                no answer within TIMEOUT clocks -> Closed.
//   Passive close (the chip reports a FIN from the peer): if the channel
//                still has data to send (more_data) -> Half Closed, where
//                transmission goes on and reception is stopped, until the
//                application has finished (more_data low), then FIN ->
//                ACK Wait; with nothing more to send, FIN ACK at once ->
//                ACK Wait. The peer's ACK (socket closed) -> Closed.
//   A reset from the peer (socket closed unexpectedly) -> Closed from any
//   state.
// On reaching Closed the machine pulses closed for the channel, which sends
// it back to the connect machine's Connection Closed state.
//
// States and transitions follow the controller's description of the
// disconnection process; the SSR codes, the timeout and the polling are this
// design's choices.
//
// Interface: est per channel from the connect machine; close_req and
// more_data per channel from the application side; tx_allow / rx_allow per
// channel; closed pulses; bus master port. Events pulse one clock:
// ev_active_close, ev_passive_close, ev_half_closed, ev_fin_wait, ev_timeout.
module tcp_disconnect_fsm
  import nc_pkg::*;
#(
  parameter int unsigned TIMEOUT = 50000
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        enable,
  input  logic [3:0]  est,
  input  logic [3:0]  close_req,
  input  logic [3:0]  more_data,
  output logic [3:0]  tx_allow,
  output logic [3:0]  rx_allow,
  output logic [3:0]  closed,
  output bus_req_t    m_req,
  input  bus_rsp_t    m_rsp,
  output logic        ev_active_close,
  output logic        ev_passive_close,
  output logic        ev_half_closed,
  output logic        ev_fin_wait,
  output logic        ev_timeout
);

  typedef enum logic [2:0] {
    D_OPEN, D_FINACK_WAIT, D_FIN_WAIT, D_HALF_CLOSED, D_ACK_WAIT, D_CLOSED
  } disc_e;

  typedef enum logic [1:0] {S_PICK, S_POLL, S_CLOSECMD} state_e;

  disc_e       dst   [4];
  logic [31:0] timer [4];
  state_e      state;
  logic [1:0]  cur;
  disc_e       after_close;

  always_comb begin
    for (int c = 0; c < 4; c++) begin
      tx_allow[c] = est[c] && (dst[c] == D_OPEN || dst[c] == D_HALF_CLOSED);
      rx_allow[c] = est[c] && (dst[c] == D_OPEN || dst[c] == D_FINACK_WAIT || dst[c] == D_FIN_WAIT);
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int c = 0; c < 4; c++) begin
        dst[c]   <= D_OPEN;
        timer[c] <= '0;
      end
      state            <= S_PICK;
      cur              <= '0;
      after_close      <= D_FINACK_WAIT;
      m_req            <= '0;
      closed           <= '0;
      ev_active_close  <= 1'b0;
      ev_passive_close <= 1'b0;
      ev_half_closed   <= 1'b0;
      ev_fin_wait      <= 1'b0;
      ev_timeout       <= 1'b0;
    end else begin
      closed           <= '0;
      ev_active_close  <= 1'b0;
      ev_passive_close <= 1'b0;
      ev_half_closed   <= 1'b0;
      ev_fin_wait      <= 1'b0;
      ev_timeout       <= 1'b0;
      for (int c = 0; c < 4; c++)
        if ((dst[c] == D_FINACK_WAIT || dst[c] == D_ACK_WAIT) && timer[c] != '1)
          timer[c] <= timer[c] + 1'b1;
      unique case (state)
        S_PICK: begin
          if (enable && est[cur]) begin
            unique case (dst[cur])
              D_CLOSED: begin               // tell the connect machine, start over
                closed[cur] <= 1'b1;
                dst[cur]    <= D_OPEN;
                cur         <= cur + 1'b1;
              end
              D_OPEN: begin
                if (close_req[cur]) begin
                  after_close     <= D_FINACK_WAIT;
                  ev_active_close <= 1'b1;
                  state           <= S_CLOSECMD;
                end else begin
                  state <= S_POLL;
                end
              end
              D_HALF_CLOSED: begin
                if (!more_data[cur]) begin
                  after_close <= D_ACK_WAIT;
                  state       <= S_CLOSECMD;
                end else begin
                  state <= S_POLL;
                end
              end
              default: state <= S_POLL;
            endcase
          end else begin
            if (!est[cur]) dst[cur] <= D_OPEN;
            cur <= cur + 1'b1;
          end
        end
        S_CLOSECMD: begin                   // FIN (or FIN ACK) via close command
          if (!m_req.req) begin
            m_req <= '{req: 1'b1, we: 1'b1, addr: cr_addr(cur), wdata: CR_CLOSE};
          end else if (m_rsp.done) begin
            m_req.req  <= 1'b0;
            dst[cur]   <= after_close;
            timer[cur] <= '0;
            state      <= S_PICK;
            cur        <= cur + 1'b1;
          end
        end
        S_POLL: begin
          if (!m_req.req) begin
            m_req <= '{req: 1'b1, we: 1'b0, addr: chreg_addr(cur, O_SSR), wdata: 8'h00};
          end else if (m_rsp.done) begin
            m_req.req <= 1'b0;
            state     <= S_PICK;
            cur       <= cur + 1'b1;
            if (m_rsp.rdata == SS_CLOSED) begin
              dst[cur] <= D_CLOSED;         // FIN ACK, final ACK, or reset
            end else begin
              unique case (dst[cur])
                D_OPEN: if (m_rsp.rdata == SS_PEER_FIN) begin
                  ev_passive_close <= 1'b1;
                  if (more_data[cur]) begin
                    dst[cur]       <= D_HALF_CLOSED;
                    ev_half_closed <= 1'b1;
                  end else begin
                    after_close <= D_ACK_WAIT;
                    state       <= S_CLOSECMD;
                    cur         <= cur;
                  end
                end
                D_FINACK_WAIT: begin
                  if (m_rsp.rdata == SS_FIN_WAIT) begin
                    dst[cur]    <= D_FIN_WAIT;
                    ev_fin_wait <= 1'b1;
                  end else if (timer[cur] >= 32'(TIMEOUT)) begin
                    dst[cur]   <= D_CLOSED;
                    ev_timeout <= 1'b1;
                  end
                end
                D_ACK_WAIT: if (timer[cur] >= 32'(TIMEOUT)) begin
                  dst[cur]   <= D_CLOSED;
                  ev_timeout <= 1'b1;
                end
                default: ;
              endcase
            end
          end
        end
        default: state <= S_PICK;
      endcase
    end
  end

endmodule
