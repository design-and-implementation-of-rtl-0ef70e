// w3100a_bus_if: read and write cycle generator for the W3100A MCU bus.
//
// The W3100A on the IIM7010 module only runs in its clocked mode and needs
// chip select (CS) held for at least 100 ns, RD/WR asserted at least 20 ns
// after CS falls and released at least 20 ns before CS rises, and the
// address held for the whole CS period. With the 50 MHz (20 ns) controller
// clock this makes a read take 9 clocks (180 ns) and a write 8 clocks
// (160 ns); both totals are the design's published numbers. A cycle counter
// walks through the phases:
//
//   read  (9 clocks): 0 address, 1..7 CS low, 2..6 RD low, data sampled at
//                     the end of clock 6 (RD low for 100 ns > 73 ns t_RO),
//                     8 CS high again, address still held.
//   write (8 clocks): 0 address, 1..6 CS low, 2..5 WR low (80 ns > 56 ns
//                     t_WW), data driven 1..7 (overlaps WR rise by 40 ns).
//
// The exact clock on which each strobe changes is this design's choice
// inside those rules. All bus outputs come straight from flip-flops. The
// bidirectional data bus is split into data_o / data_oe / data_i; the pad
// (with its pull-down) sits outside. CS, RD and WR are active low.
//
// Interface: a master presents req (see nc_pkg::bus_req_t) and holds it; the
// cycle starts on the next clock when idle, and rsp.done pulses for one
// clock in the last clock of the cycle, with rsp.rdata for a read. A new
// cycle can start on the clock after done, so two accesses are never on
// consecutive clocks.
module w3100a_bus_if
  import nc_pkg::*;
#(
  parameter int unsigned READ_CYCLES  = 9,   // 180 ns at 50 MHz
  parameter int unsigned WRITE_CYCLES = 8    // 160 ns at 50 MHz
) (
  input  logic        clk,
  input  logic        rst,
  input  bus_req_t    req,
  output bus_rsp_t    rsp,
  output logic        busy,
  // W3100A pins
  output logic [14:0] addr_o,
  output logic [7:0]  data_o,
  output logic        data_oe,
  input  logic [7:0]  data_i,
  output logic        cs_n,
  output logic        rd_n,
  output logic        wr_n
);

  logic [3:0] cnt, cnt_n;
  logic       busy_n;
  logic       we_q;
  logic [3:0] last_q, last_n;
  logic [7:0] rdata_q;

  always_comb begin
    busy_n = busy;
    cnt_n  = cnt;
    last_n = last_q;
    if (!busy) begin
      if (req.req) begin
        busy_n = 1'b1;
        cnt_n  = '0;
        last_n = req.we ? 4'(WRITE_CYCLES - 1) : 4'(READ_CYCLES - 1);
      end
    end else if (cnt == last_q) begin
      busy_n = 1'b0;
    end else begin
      cnt_n = cnt + 4'd1;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      busy    <= 1'b0;
      cnt     <= '0;
      last_q  <= '0;
      we_q    <= 1'b0;
      addr_o  <= '0;
      data_o  <= '0;
      data_oe <= 1'b0;
      cs_n    <= 1'b1;
      rd_n    <= 1'b1;
      wr_n    <= 1'b1;
      rdata_q <= '0;
    end else begin
      busy   <= busy_n;
      cnt    <= cnt_n;
      last_q <= last_n;
      if (!busy && req.req) begin
        we_q   <= req.we;
        addr_o <= req.addr;
        data_o <= req.wdata;
      end
      // strobes for the clock that starts now, decoded from the next count
      cs_n    <= !(busy_n && cnt_n >= 4'd1 && cnt_n <= last_n - 4'd1);
      rd_n    <= !(busy_n && !(busy ? we_q : req.we) && cnt_n >= 4'd2 && cnt_n <= last_n - 4'd2);
      wr_n    <= !(busy_n &&  (busy ? we_q : req.we) && cnt_n >= 4'd2 && cnt_n <= last_n - 4'd2);
      data_oe <= busy_n && (busy ? we_q : req.we) && cnt_n >= 4'd1;
      if (busy && !we_q && cnt == last_q - 4'd2)
        rdata_q <= data_i;
    end
  end

  assign rsp.done  = busy && cnt == last_q;
  assign rsp.rdata = rdata_q;

  // CS must enclose RD and WR
  a_strobe_in_cs: assert property (@(posedge clk) disable iff (rst) (!rd_n || !wr_n) |-> !cs_n);
  a_not_both:     assert property (@(posedge clk) disable iff (rst) !(!rd_n && !wr_n));

endmodule
