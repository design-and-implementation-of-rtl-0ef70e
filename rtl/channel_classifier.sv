// channel_classifier: steers received bytes into the receive FIFO of the
// channel they arrived on.
//
// The receive state machine reads one W3100A channel at a time and tags each
// byte with that channel's number; the classifier writes the byte into the
// matching receive FIFO and reports back whether that FIFO is full, which is
// what the receive state machine checks before each read. Bytes for a channel
// whose rx_en bit is low (closed, half-closed for reception, or being
// reconfigured) are discarded and counted in drop_cnt, since nobody may read
// them. The drop counter is this design's addition.
//
// Interface: in_valid/in_data/in_ch from the receive state machine, in_full
// is combinational from the selected FIFO; fifo_din is in_data shared by all
// FIFOs, fifo_wr selects which one stores it. Timing: the byte is written on
// the same clock.
module channel_classifier #(
  parameter int unsigned NCH = 4
) (
  input  logic                   clk,
  input  logic                   rst,
  input  logic [NCH-1:0]         rx_en,
  input  logic                   in_valid,
  input  logic [7:0]             in_data,
  input  logic [$clog2(NCH)-1:0] in_ch,
  output logic                   in_full,
  input  logic [NCH-1:0]         fifo_full,
  output logic [NCH-1:0]         fifo_wr,
  output logic [7:0]             fifo_din,
  output logic [15:0]            drop_cnt
);

  assign fifo_din = in_data;
  assign in_full  = rx_en[in_ch] && fifo_full[in_ch];

  always_comb begin
    fifo_wr = '0;
    fifo_wr[in_ch] = in_valid && rx_en[in_ch];
  end

  always_ff @(posedge clk) begin
    if (rst) drop_cnt <= '0;
    else if (in_valid && !rx_en[in_ch] && drop_cnt != '1) drop_cnt <= drop_cnt + 1'b1;
  end

endmodule
