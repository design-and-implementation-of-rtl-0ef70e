// rx_fsm: the receiver state machine shared by all four channels.
//
// The W3100A writes incoming data into each channel's 2 KB circular receive
// buffer between the receive read pointer RRPR (moved by the controller) and
// the receive write pointer RWPR (moved by the chip), and pulls its INT pin
// when data has arrived. Instead of polling all the pointers, this machine
// waits for the interrupt and then
//   1. reads the interrupt register IR to find the interrupting channel (the
//      lowest-numbered one if several) and that channel's interrupt status
//      register ISR (the read clears it in the chip);
//   2. if the status says data was received and the channel is receiving,
//      waits until the channel's receive FIFO is not full;
//   3. reads RWPR and RRPR (shadow register first, then four bytes MSB
//      first) and computes the received data size from the positions inside
//      the buffer:  RWPR > RRPR : RDS = RWPR - RRPR
//                   otherwise   : RDS = 2048 - (RRPR - RWPR);
//   4. reads bytes at RRPR + DRL into the classifier, counting the data
//      received length DRL, while RDS > DRL and the receive FIFO has room;
//   5. writes RRPR + DRL back to the read pointer and the receive bit into
//      the channel's command register.
// Data that arrives after RWPR was read is left for the next interrupt.
//
// All of this follows the controller's description. This design adds one
// rule: equal pointers are taken as "nothing to read" rather than as a full
// buffer, because the chip is assumed never to fill a receive buffer to the
// last byte (the transmit side keeps the same one-byte gap). UDP data is
// passed on as read, still carrying the chip's 8-byte header (length,
// source IP, source port) in front of each datagram.
//
// Interface: int_n from the W3100A (active low); rx_en per channel; byte
// stream out_valid/out_data/out_ch to the classifier with fifo_full back;
// bus master port. Events pulse for one clock: ev_rx_stall when the receive
// FIFO filled in the middle of a read, ev_recv when a receive command is
// issued.
module rx_fsm
  import nc_pkg::*;
#(
  parameter int unsigned BUF_BYTES = 2048
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        enable,
  input  logic        int_n,
  input  logic [3:0]  rx_en,
  // to the channel classifier
  output logic        out_valid,
  output logic [7:0]  out_data,
  output logic [1:0]  out_ch,
  input  logic        fifo_full,
  // W3100A bus
  output bus_req_t    m_req,
  input  bus_rsp_t    m_rsp,
  // events
  output logic        ev_rx_stall,
  output logic        ev_recv
);

  localparam int unsigned OW = $clog2(BUF_BYTES);

  typedef enum logic [3:0] {
    S_IDLE, S_IR, S_ISR, S_WAITFIFO, S_PTR, S_CALC, S_READ, S_GAP, S_NEXT, S_UPDATE, S_CMD
  } state_e;

  state_e      state;
  logic [1:0]  cur;
  logic [31:0] rwpr, rrpr, acc;
  logic        second;
  logic [2:0]  step;
  logic [OW:0] rds, drl;

  wire [OW-1:0] rw_off = rwpr[OW-1:0];
  wire [OW-1:0] rr_off = rrpr[OW-1:0];
  wire [31:0]   rr_new = rrpr + 32'(drl);
  wire ptr_e    which  = second ? P_RR : P_RW;

  assign out_ch = cur;

  always_ff @(posedge clk) begin
    if (rst) begin
      state       <= S_IDLE;
      cur         <= '0;
      rwpr        <= '0;
      rrpr        <= '0;
      acc         <= '0;
      second      <= 1'b0;
      step        <= '0;
      rds         <= '0;
      drl         <= '0;
      m_req       <= '0;
      out_valid   <= 1'b0;
      out_data    <= '0;
      ev_rx_stall <= 1'b0;
      ev_recv     <= 1'b0;
    end else begin
      out_valid   <= 1'b0;
      ev_rx_stall <= 1'b0;
      ev_recv     <= 1'b0;
      unique case (state)
        S_IDLE: if (enable && !int_n) state <= S_IR;
        S_IR: begin
          if (!m_req.req) begin
            m_req <= '{req: 1'b1, we: 1'b0, addr: A_IR, wdata: 8'h00};
          end else if (m_rsp.done) begin
            m_req.req <= 1'b0;
            if      (m_rsp.rdata[0]) begin cur <= 2'd0; state <= S_ISR; end
            else if (m_rsp.rdata[1]) begin cur <= 2'd1; state <= S_ISR; end
            else if (m_rsp.rdata[2]) begin cur <= 2'd2; state <= S_ISR; end
            else if (m_rsp.rdata[3]) begin cur <= 2'd3; state <= S_ISR; end
            else state <= S_IDLE;
          end
        end
        S_ISR: begin
          if (!m_req.req) begin
            m_req <= '{req: 1'b1, we: 1'b0, addr: isr_addr(cur), wdata: 8'h00};
          end else if (m_rsp.done) begin
            m_req.req <= 1'b0;
            if ((m_rsp.rdata & ISR_RECV) != 8'h00 && rx_en[cur]) state <= S_WAITFIFO;
            else                                                  state <= S_IDLE;
          end
        end
        S_WAITFIFO: begin
          if (!fifo_full) begin
            second <= 1'b0;
            step   <= '0;
            state  <= S_PTR;
          end
        end
        S_PTR: begin                        // RWPR then RRPR
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
                rwpr   <= {acc[23:0], m_rsp.rdata};
                second <= 1'b1;
              end else begin
                rrpr  <= {acc[23:0], m_rsp.rdata};
                state <= S_CALC;
              end
            end else begin
              step <= step + 1'b1;
            end
          end
        end
        S_CALC: begin
          if (rw_off > rr_off)      rds <= (OW+1)'(rw_off - rr_off);
          else if (rw_off < rr_off) rds <= (OW+1)'(BUF_BYTES) - (OW+1)'(rr_off - rw_off);
          else                      rds <= '0;
          drl   <= '0;
          state <= S_NEXT;
        end
        S_NEXT: begin
          if (rds > drl) begin
            if (fifo_full) begin
              ev_rx_stall <= 1'b1;
              step  <= '0;
              state <= S_UPDATE;
            end else begin
              state <= S_READ;
            end
          end else begin
            step  <= '0;
            state <= (drl == '0) ? S_IDLE : S_UPDATE;
          end
        end
        S_READ: begin
          if (!m_req.req) begin
            m_req <= '{req: 1'b1, we: 1'b0, addr: rxbuf_addr(cur, OW'(rr_off + OW'(drl))), wdata: 8'h00};
          end else if (m_rsp.done) begin
            m_req.req <= 1'b0;
            out_valid <= 1'b1;
            out_data  <= m_rsp.rdata;
            drl       <= drl + 1'b1;
            state     <= S_GAP;           // let the FIFO count settle
          end
        end
        S_GAP: state <= S_NEXT;
        S_UPDATE: begin                   // RRPR += DRL, MSB first
          if (!m_req.req) begin
            m_req <= '{req: 1'b1, we: 1'b1, addr: ptr_addr(cur, P_RR, step[1:0]),
                       wdata: rr_new[31 - 8*step[1:0] -: 8]};
          end else if (m_rsp.done) begin
            m_req.req <= 1'b0;
            if (step == 3'd3) state <= S_CMD;
            else              step  <= step + 1'b1;
          end
        end
        S_CMD: begin
          if (!m_req.req) begin
            m_req <= '{req: 1'b1, we: 1'b1, addr: cr_addr(cur), wdata: CR_RECV};
          end else if (m_rsp.done) begin
            m_req.req <= 1'b0;
            ev_recv   <= 1'b1;
            state     <= S_IDLE;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
