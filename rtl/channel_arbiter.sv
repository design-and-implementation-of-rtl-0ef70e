// channel_arbiter: picks which channel's transmit FIFO feeds the single
// transmission state machine.
//
// Following the controller's description, the arbiter checks the channels in
// turn. As soon as one has data it stays on that channel, handing bytes to the
// transmission state machine together with the 2-bit channel number, until
// either the FIFO runs empty or MAX_BURST bytes (2048, the per-channel
// transmit buffer of the W3100A when four channels share it) have been taken.
// It then raises flush, telling the transmission state machine to send what it
// has written, waits for that send to finish (send_done) and moves on to the
// next numerically higher channel, so every channel gets an equal share.
// Channels whose chan_en bit is low (not connected, or being reconfigured)
// are skipped; if a channel is disabled while served, the burst ends there.
//
// Interface: stream to the transmit state machine = valid/data/ch, popped by
// pop (same clock, show-ahead FIFOs); flush is a level held until send_done;
// ev_burst_limit pulses when a burst is cut at MAX_BURST bytes.
// Timing: one clock per channel checked while scanning.
module channel_arbiter #(
  parameter int unsigned NCH       = 4,
  parameter int unsigned MAX_BURST = 2048
) (
  input  logic                   clk,
  input  logic                   rst,
  input  logic [NCH-1:0]         chan_en,
  // transmit FIFOs
  input  logic [NCH-1:0]         fifo_empty,
  input  logic [7:0]             fifo_dout [NCH],
  output logic [NCH-1:0]         fifo_rd,
  // to the transmission state machine
  output logic                   valid,
  output logic [7:0]             data,
  output logic [$clog2(NCH)-1:0] ch,
  input  logic                   pop,
  output logic                   flush,
  input  logic                   send_done,
  output logic                   ev_burst_limit   // a burst stopped at MAX_BURST
);

  localparam int unsigned CW = $clog2(NCH);
  localparam int unsigned BW = $clog2(MAX_BURST + 1);

  typedef enum logic [1:0] {S_SCAN, S_SERVE, S_FLUSH} state_e;
  state_e        state;
  logic [CW-1:0] cur;
  logic [BW-1:0] sent;

  wire burst_full = (sent == BW'(MAX_BURST));

  assign ch    = cur;
  assign data  = fifo_dout[cur];
  assign valid = (state == S_SERVE) && chan_en[cur] && !fifo_empty[cur] && !burst_full;
  assign flush = (state == S_FLUSH);

  always_comb begin
    fifo_rd = '0;
    fifo_rd[cur] = valid && pop;
  end

  assign ev_burst_limit = (state == S_SERVE) && valid && pop && sent == BW'(MAX_BURST - 1);

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= S_SCAN;
      cur   <= '0;
      sent  <= '0;
    end else begin
      unique case (state)
        S_SCAN: begin
          if (chan_en[cur] && !fifo_empty[cur]) begin
            state <= S_SERVE;
            sent  <= '0;
          end else begin
            cur <= (cur == CW'(NCH - 1)) ? '0 : cur + 1'b1;
          end
        end
        S_SERVE: begin
          if (valid && pop) sent <= sent + 1'b1;
          // FIFO emptied, burst limit reached or channel switched off
          if (!chan_en[cur] || burst_full || (fifo_empty[cur] && !(valid && pop)))
            state <= S_FLUSH;
          else if (valid && pop && sent == BW'(MAX_BURST - 1))
            state <= S_FLUSH;
        end
        S_FLUSH: begin
          if (send_done) begin
            state <= S_SCAN;
            cur   <= (cur == CW'(NCH - 1)) ? '0 : cur + 1'b1;
          end
        end
        default: state <= S_SCAN;
      endcase
    end
  end

  a_burst_limit: assert property (@(posedge clk) disable iff (rst) sent <= BW'(MAX_BURST));

endmodule
