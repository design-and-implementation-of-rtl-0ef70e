// bus_arbiter: shares the one W3100A bus among the controller's state
// machines (initialisation, TCP connect, transmit, receive, TCP disconnect).
//
// The W3100A has a single address/data/control bus, so every state machine
// goes through this arbiter; it plays the part of the control, address and
// data multiplexers and their select logic. The grant is per access: when
// the bus cycle generator is free, the arbiter picks the next requesting
// master in round-robin order after the last one served, forwards its
// request, and routes done back to it alone (rdata goes to every master
// unchanged; only the one that sees done takes it). Round robin per access is
// this design's choice; it keeps a long transmit or receive burst from
// locking the other machines out.
//
// Interface: m_req[i] / m_rsp[i] per master (nc_pkg::bus_req_t/bus_rsp_t);
// s_req / s_rsp to w3100a_bus_if. A master holds req until its done.
// Timing: one clock from a request on an idle bus to s_req.
module bus_arbiter
  import nc_pkg::*;
#(
  parameter int unsigned N = 5
) (
  input  logic     clk,
  input  logic     rst,
  input  bus_req_t m_req [N],
  output bus_rsp_t m_rsp [N],
  output bus_req_t s_req,
  input  bus_rsp_t s_rsp
);

  localparam int unsigned IW = (N > 1) ? $clog2(N) : 1;

  logic          owned;
  logic [IW-1:0] owner, last;
  logic          found;
  logic [IW-1:0] pick;

  // round-robin search starting after the last master served
  always_comb begin
    found = 1'b0;
    pick  = '0;
    for (int unsigned k = 1; k <= N; k++) begin
      logic [IW:0] idx;
      idx = (IW+1)'((int'(last) + k) % N);
      if (!found && m_req[idx[IW-1:0]].req) begin
        found = 1'b1;
        pick  = idx[IW-1:0];
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      owned <= 1'b0;
      owner <= '0;
      last  <= IW'(N - 1);
    end else if (!owned) begin
      if (found) begin
        owned <= 1'b1;
        owner <= pick;
      end
    end else if (s_rsp.done) begin
      owned <= 1'b0;
      last  <= owner;
    end
  end

  always_comb begin
    s_req = '0;
    if (owned) s_req = m_req[owner];
    for (int unsigned i = 0; i < N; i++) begin
      m_rsp[i].rdata = s_rsp.rdata;
      m_rsp[i].done  = owned && (owner == IW'(i)) && s_rsp.done;
    end
  end

  a_owner_holds: assert property (@(posedge clk) disable iff (rst) owned |-> m_req[owner].req);

endmodule
