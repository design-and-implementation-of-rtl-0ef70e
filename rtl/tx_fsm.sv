// tx_fsm: the transmission state machine shared by all four channels.
//
// It takes bytes from the channel arbiter (which also tells it the channel)
// and moves them into that channel's 2 KB circular transmit buffer in the
// W3100A. For each burst it
//   1. reads the transmit write pointer TWPR and, for a TCP channel, the
//      transmit acknowledge pointer TAPR, for a UDP channel the transmit read
//      pointer TRPR (each pointer: one read of its shadow register, then its
//      four bytes, most significant first);
//   2. works out the free buffer space from the pointer positions inside the
//      buffer:  TWPR > TAPR : FBS = 2048 - (TWPR - TAPR)
//               TWPR < TAPR : FBS = TAPR - TWPR
//               equal       : FBS = 2048;
//   3. writes bytes at TWPR + SDS, counting the send data size SDS, until the
//      arbiter has no more data for this burst (flush) or the free space is
//      used up;
//   4. reads the channel's interrupt status register until its send bit is
//      0, i.e. the previous send command has completed;
//   5. writes TWPR + SDS back to the write pointer and the send bit into the
//      channel's command register.
// It then reports send_done to the arbiter.
//
// Steps 1-5 and both formulas follow the controller's description. One
// choice is this design's own: it stops one byte short of a full buffer
// (uses FBS - 1), because with the formula above a completely full buffer
// has equal pointers and would read as empty.
//
// Interface: arbiter stream valid/data/ch/pop/flush/send_done, where pop is
// combinational (the byte is taken in the clock it is offered); ch_tcp says
// which channels run TCP; bus master port. Event outputs pulse for one clock:
// ev_buf_full when a burst stops for lack of buffer space, ev_send_wait when
// the send bit was still set, ev_send when a send command is issued.
module tx_fsm
  import nc_pkg::*;
#(
  parameter int unsigned BUF_BYTES = 2048
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        enable,
  input  logic [3:0]  ch_tcp,
  // from the channel arbiter
  input  logic        valid,
  input  logic [7:0]  data,
  input  logic [1:0]  ch,
  output logic        pop,
  input  logic        flush,
  output logic        send_done,
  // W3100A bus
  output bus_req_t    m_req,
  input  bus_rsp_t    m_rsp,
  // events
  output logic        ev_buf_full,
  output logic        ev_send_wait,
  output logic        ev_send
);

  localparam int unsigned OW = $clog2(BUF_BYTES);

  typedef enum logic [3:0] {
    S_IDLE, S_PTR, S_CALC, S_WRITE, S_NEXT, S_CHKSEND, S_UPDATE, S_CMD
  } state_e;

  state_e      state;
  logic [1:0]  cur;
  logic [31:0] twpr, tapr, acc;
  logic        second;         // reading the acknowledge/read pointer
  logic [2:0]  step;           // 0 = shadow, 1..4 = bytes
  logic [OW:0] fbs, sds;
  logic [7:0]  wbyte;          // byte taken from the arbiter, being written

  wire [OW-1:0] tw_off = twpr[OW-1:0];
  wire [OW-1:0] ta_off = tapr[OW-1:0];
  wire [31:0]   tw_new = twpr + 32'(sds);
  wire ptr_e    which  = !second ? P_TW : (ch_tcp[cur] ? P_TA : P_TR);

  // A byte is taken in the same clock it is offered, so it cannot be lost or
  // taken twice if the arbiter withdraws the offer (channel disabled).
  assign pop = (state == S_NEXT) && !(sds + 1'b1 >= fbs) && valid && ch == cur;

  always_ff @(posedge clk) begin
    if (rst) begin
      state        <= S_IDLE;
      cur          <= '0;
      twpr         <= '0;
      tapr         <= '0;
      acc          <= '0;
      second       <= 1'b0;
      step         <= '0;
      fbs          <= '0;
      sds          <= '0;
      m_req        <= '0;
      wbyte        <= '0;
      send_done    <= 1'b0;
      ev_buf_full  <= 1'b0;
      ev_send_wait <= 1'b0;
      ev_send      <= 1'b0;
    end else begin
      send_done    <= 1'b0;
      ev_buf_full  <= 1'b0;
      ev_send_wait <= 1'b0;
      ev_send      <= 1'b0;
      unique case (state)
        S_IDLE: begin
          if (enable && valid) begin
            cur    <= ch;
            second <= 1'b0;
            step   <= '0;
            state  <= S_PTR;
          end else if (enable && flush) begin
            send_done <= 1'b1;              // nothing left to send
          end
        end
        // read TWPR, then TAPR/TRPR: shadow register, then 4 bytes MSB first
        S_PTR: begin
          if (!m_req.req) begin
            m_req <= '{req: 1'b1, we: 1'b0,
                       addr: (step == 0) ? shadow_addr(cur, which) : ptr_addr(cur, which, 2'(step - 1)),
                       wdata: 8'h00};
          end else if (m_rsp.done) begin
            m_req.req <= 1'b0;
            if (step != 0) acc <= {acc[23:0], m_rsp.rdata};
            if (step == 3'd4) begin
              step <= '0;
              if (!second) begin
                twpr   <= {acc[23:0], m_rsp.rdata};
                second <= 1'b1;
              end else begin
                tapr  <= {acc[23:0], m_rsp.rdata};
                state <= S_CALC;
              end
            end else begin
              step <= step + 1'b1;
            end
          end
        end
        S_CALC: begin
          if (tw_off > ta_off)      fbs <= (OW+1)'(BUF_BYTES) - (OW+1)'(tw_off - ta_off);
          else if (tw_off < ta_off) fbs <= (OW+1)'(ta_off - tw_off);
          else                      fbs <= (OW+1)'(BUF_BYTES);
          sds   <= '0;
          state <= S_NEXT;
        end
        S_NEXT: begin                       // decide: write more, or send
          if (sds + 1'b1 >= fbs) begin
            ev_buf_full <= 1'b1;
            state       <= S_CHKSEND;
          end else if (pop) begin
            wbyte <= data;
            state <= S_WRITE;
          end else if (flush || !enable) begin
            state <= S_CHKSEND;
          end
        end
        S_WRITE: begin
          if (!m_req.req) begin
            m_req <= '{req: 1'b1, we: 1'b1, addr: txbuf_addr(cur, OW'(tw_off + OW'(sds))), wdata: wbyte};
          end else if (m_rsp.done) begin
            m_req.req <= 1'b0;
            sds       <= sds + 1'b1;
            state     <= S_NEXT;
          end
        end
        S_CHKSEND: begin                    // previous send finished?
          if (!m_req.req) begin
            m_req <= '{req: 1'b1, we: 1'b0, addr: isr_addr(cur), wdata: 8'h00};
          end else if (m_rsp.done) begin
            m_req.req <= 1'b0;
            if ((m_rsp.rdata & ISR_SEND) == 8'h00) begin
              step  <= '0;
              state <= (sds == '0) ? S_IDLE : S_UPDATE;
              if (sds == '0) send_done <= 1'b1;
            end else begin
              ev_send_wait <= 1'b1;
            end
          end
        end
        S_UPDATE: begin                     // TWPR += SDS, MSB first
          if (!m_req.req) begin
            m_req <= '{req: 1'b1, we: 1'b1, addr: ptr_addr(cur, P_TW, step[1:0]),
                       wdata: tw_new[31 - 8*step[1:0] -: 8]};
          end else if (m_rsp.done) begin
            m_req.req <= 1'b0;
            if (step == 3'd3) state <= S_CMD;
            else              step  <= step + 1'b1;
          end
        end
        S_CMD: begin
          if (!m_req.req) begin
            m_req <= '{req: 1'b1, we: 1'b1, addr: cr_addr(cur), wdata: CR_SEND};
          end else if (m_rsp.done) begin
            m_req.req <= 1'b0;
            ev_send   <= 1'b1;
            send_done <= 1'b1;
            state     <= S_IDLE;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
