// reconfig_ctrl: static-side handling of the partially reconfigurable
// channel.
//
// One channel (RP_CH) lives in the reconfigurable region of the FPGA, whose
// partial bitstream can be replaced at run time, e.g. to switch that channel
// from TCP to UDP or to give it a larger maximum segment size, while the
// other channels keep running. The static part must not depend on the
// region while it is being rewritten, so while rp_busy is high (the partial
// bitstream is loading) this block isolates the channel: its transmit and
// receive enables are held low, so the channel arbiter skips it and the
// classifier discards what arrives for it, and its TCP connection state is
// dropped. When loading ends, the newly loaded module's configuration
// (rp_variant: 0 = the original module, 1 = the alternative one) is written
// into the W3100A by the initialisation machine, and the channel is released
// when that re-initialisation is done. rp_tcp tells the rest of the
// controller which protocol the channel now runs.
//
// Isolating the channel and re-initialising it from its own stored
// configuration follow the description of the reconfigurable design; the
// handshake signals are this design's. Interface: rp_busy/rp_variant from
// the configuration port side, reinit_req (one-clock pulse) / reinit_alt /
// reinit_done to init_fsm, isolate (level). Timing: reinit_req one clock
// after rp_busy falls (and after init_done).
module reconfig_ctrl #(
  parameter logic BASE_TCP = 1'b1,   // protocol of the original module
  parameter logic ALT_TCP  = 1'b0    // protocol of the alternative module
) (
  input  logic clk,
  input  logic rst,
  input  logic init_done,
  input  logic rp_busy,
  input  logic rp_variant,
  output logic reinit_req,
  output logic reinit_alt,
  input  logic reinit_done,
  output logic isolate,
  output logic rp_tcp,
  output logic ev_reconfig
);

  typedef enum logic [1:0] {R_RUN, R_LOADING, R_REINIT, R_WAIT} state_e;
  state_e state;

  assign isolate = (state != R_RUN);

  always_ff @(posedge clk) begin
    if (rst) begin
      state       <= R_RUN;
      reinit_req  <= 1'b0;
      reinit_alt  <= 1'b0;
      rp_tcp      <= BASE_TCP;
      ev_reconfig <= 1'b0;
    end else begin
      reinit_req  <= 1'b0;
      ev_reconfig <= 1'b0;
      unique case (state)
        R_RUN:     if (rp_busy) state <= R_LOADING;
        R_LOADING: if (!rp_busy && init_done) begin
          reinit_alt <= rp_variant;
          rp_tcp     <= rp_variant ? ALT_TCP : BASE_TCP;
          state      <= R_REINIT;
        end
        R_REINIT: begin
          reinit_req <= 1'b1;
          state      <= R_WAIT;
        end
        R_WAIT: if (reinit_done) begin
          state       <= R_RUN;
          ev_reconfig <= 1'b1;
        end
        default: state <= R_RUN;
      endcase
    end
  end

endmodule
