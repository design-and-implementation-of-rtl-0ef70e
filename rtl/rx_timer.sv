// rx_timer: throughput measurement counter for received data.
//
// For the throughput experiments the controller keeps a counter of the time
// between the first and the last received data. This block does that for the
// byte stream leaving the receiver: the first byte after an idle period
// starts a measurement, every byte records the current time and adds to the
// byte count, and when no byte has arrived for IDLE_TIMEOUT clocks the
// measurement ends: result_valid pulses with the elapsed clocks between the
// first and last byte and the number of bytes. now is a free-running clock
// counter that can be stored next to each packet as its time stamp, as the
// partial-reconfiguration experiment does.
//
// Measuring on bytes rather than on packets, the widths and the timeout are
// this design's choices. Interface: rx_valid is one byte; outputs are
// registered.
module rx_timer #(
  parameter int unsigned IDLE_TIMEOUT = 50_000_000   // 1 s at 50 MHz
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        rx_valid,
  output logic [31:0] now,
  output logic        result_valid,
  output logic [31:0] elapsed,
  output logic [31:0] bytes
);

  logic        active;
  logic [31:0] first_t, last_t, idle, cnt;

  always_ff @(posedge clk) begin
    if (rst) begin
      now          <= '0;
      active       <= 1'b0;
      first_t      <= '0;
      last_t       <= '0;
      idle         <= '0;
      cnt          <= '0;
      result_valid <= 1'b0;
      elapsed      <= '0;
      bytes        <= '0;
    end else begin
      now          <= now + 1'b1;
      result_valid <= 1'b0;
      if (rx_valid) begin
        if (!active) begin
          active  <= 1'b1;
          first_t <= now;
          cnt     <= 32'd1;
        end else begin
          cnt <= cnt + 1'b1;
        end
        last_t <= now;
        idle   <= '0;
      end else if (active) begin
        idle <= idle + 1'b1;
        if (idle == 32'(IDLE_TIMEOUT - 1)) begin
          active       <= 1'b0;
          result_valid <= 1'b1;
          elapsed      <= last_t - first_t;
          bytes        <= cnt;
        end
      end
    end
  end

endmodule
