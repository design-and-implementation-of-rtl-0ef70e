// init_fsm: brings up the W3100A and configures its channels.
//
// After a reset of the controller it pulses the W3100A reset pin (active
// high) for RST_CYCLES and waits WAKE_CYCLES, then plays back the system
// section of the network data ROM (MAC address, source IP, gateway, subnet
// mask, IMR = 0xFF, ...), one bus write per ROM word. It then starts the chip
// by writing 0x01 to the command register of channel 0 and reads the
// interrupt status register of channel 0 until it holds 0x01, which is the
// chip's sign that it is initialised. Last it plays back the four channel
// sections (protocol, ports, destination, TOS, MSS, cleared pointers, socket
// initialise) and raises init_done; from then on the other state machines
// may use the bus.
//
// A reinit_req pulse, used when the reconfigurable channel has received a
// new partial bitstream, plays back only that channel's section: the
// original one (reinit_alt = 0) or the alternative one stored for the
// reconfigured module (reinit_alt = 1); reinit_done pulses when finished.
//
// The order of the writes, the 0x01 command / 0x01 status handshake and IMR
// follow the controller's description; the reset pulse, its lengths and the
// replay-by-section scheme are this design's choices.
//
// Interface: bus master (nc_pkg::bus_req_t/bus_rsp_t), ROM port with one
// clock read latency. Timing: each ROM word costs one ROM clock plus one
// bus write (8 clocks) plus one idle clock.
module init_fsm
  import nc_pkg::*;
#(
  parameter int unsigned RST_CYCLES  = 16,
  parameter int unsigned WAKE_CYCLES = 16,
  parameter int unsigned RP_CH       = 3
) (
  input  logic        clk,
  input  logic        rst,
  output bus_req_t    m_req,
  input  bus_rsp_t    m_rsp,
  output logic [7:0]  rom_addr,
  input  logic [22:0] rom_data,
  output logic        w3_rst,
  output logic        init_done,
  input  logic        reinit_req,
  input  logic        reinit_alt,
  output logic        reinit_busy,
  output logic        reinit_done
);

  localparam int unsigned SYS_LEN = 24;
  localparam int unsigned SEC_LEN = 21;

  typedef enum logic [3:0] {
    S_RESET, S_WAKE, S_FETCH, S_WRITE, S_SYSCMD, S_POLL, S_IDLE
  } state_e;

  state_e      state;
  logic [15:0] timer;
  logic [7:0]  idx, stop;
  logic        sys_phase;   // playing the system section (then SYSCMD)

  assign rom_addr = idx;

  always_ff @(posedge clk) begin
    if (rst) begin
      state       <= S_RESET;
      timer       <= '0;
      idx         <= '0;
      stop        <= 8'(SYS_LEN);
      sys_phase   <= 1'b1;
      m_req       <= '0;
      w3_rst      <= 1'b1;
      init_done   <= 1'b0;
      reinit_busy <= 1'b0;
      reinit_done <= 1'b0;
    end else begin
      reinit_done <= 1'b0;
      unique case (state)
        S_RESET: begin
          w3_rst <= 1'b1;
          timer  <= timer + 1'b1;
          if (timer == 16'(RST_CYCLES - 1)) begin
            w3_rst <= 1'b0;
            timer  <= '0;
            state  <= S_WAKE;
          end
        end
        S_WAKE: begin
          timer <= timer + 1'b1;
          if (timer == 16'(WAKE_CYCLES - 1)) state <= S_FETCH;
        end
        S_FETCH: state <= S_WRITE;      // ROM word for idx appears now
        S_WRITE: begin
          if (!m_req.req) begin
            m_req <= '{req: 1'b1, we: 1'b1, addr: rom_data[22:8], wdata: rom_data[7:0]};
          end else if (m_rsp.done) begin
            m_req.req <= 1'b0;
            idx <= idx + 1'b1;
            if (idx + 1'b1 == stop) begin
              if (sys_phase)       state <= S_SYSCMD;
              else if (!init_done) begin
                state     <= S_IDLE;
                init_done <= 1'b1;
              end else begin
                state       <= S_IDLE;
                reinit_busy <= 1'b0;
                reinit_done <= 1'b1;
              end
            end else begin
              state <= S_FETCH;
            end
          end
        end
        S_SYSCMD: begin                  // CR0 <= 0x01
          if (!m_req.req) begin
            m_req <= '{req: 1'b1, we: 1'b1, addr: cr_addr(2'd0), wdata: CR_SYS_INIT};
          end else if (m_rsp.done) begin
            m_req.req <= 1'b0;
            state     <= S_POLL;
          end
        end
        S_POLL: begin                    // wait for ISR0 == 0x01
          if (!m_req.req) begin
            m_req <= '{req: 1'b1, we: 1'b0, addr: isr_addr(2'd0), wdata: 8'h00};
          end else if (m_rsp.done) begin
            m_req.req <= 1'b0;
            if (m_rsp.rdata == ISR_INIT_OK) begin
              sys_phase <= 1'b0;
              idx       <= 8'(SYS_LEN);
              stop      <= 8'(SYS_LEN + 4 * SEC_LEN);
              state     <= S_FETCH;
            end
          end
        end
        S_IDLE: begin
          if (reinit_req) begin
            reinit_busy <= 1'b1;
            idx   <= reinit_alt ? 8'(SYS_LEN + 4 * SEC_LEN) : 8'(SYS_LEN + RP_CH * SEC_LEN);
            stop  <= reinit_alt ? 8'(SYS_LEN + 5 * SEC_LEN) : 8'(SYS_LEN + (RP_CH + 1) * SEC_LEN);
            state <= S_FETCH;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
