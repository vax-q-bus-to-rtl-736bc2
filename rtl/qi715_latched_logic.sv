// qi715_latched_logic: the LATCHED_LOGIC block, the control signal latches
// that run a decoupled CAMAC cycle on the SCI 2280 side.
//
// `start` (a command-space address decoded in non-transparent mode) opens an
// SCI-side cycle: the latched address is put on the SCI BDAL lines for one
// clock of setup, then SYNC is asserted and held. The VAX's DIN or DOUT
// (`go_rd`/`go_wr`, latched here because they can arrive before the address
// phase ends) is then latched onto the SCI side: for a write, WRITE_DATA is
// driven for one clock of setup before DOUT. From this point the VAX has
// already been answered and the latched SYNC/DIN/DOUT stay asserted for as
// long as the CAMAC operation takes: there is no limit on the duration.
// The SCI 2280's RPLY is the end-of-operation handshake: it pulses `done`
// (and `dwl_load` for a read, so DWL captures the data in the same clock),
// DIN/DOUT are negated, and SYNC is negated once RPLY has gone. `active` is
// high from `start` until SYNC is negated; while it is high every other
// address except the 0715 CSR is refused. If the VAX ends its cycle before
// giving a data strobe, the latched cycle is abandoned.
// The latching scheme follows the document; the clocked sequencing and its
// one-clock setup times are this design's own.
module qi715_latched_logic
  import qi715_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  logic      start,     // decoupled command decoded
  input  logic      go_rd,     // VAX DIN accepted for that command
  input  logic      go_wr,     // VAX DOUT accepted (WRITE_DATA loaded)
  input  logic      host_end,  // VAX negated SYNC
  input  logic      s_rply,    // synchronized BRPLY from the SCI 2280
  output logic      l_sync,
  output logic      l_din,
  output logic      l_dout,
  output logic      l_oe,      // drive the SCI BDAL lines
  output sdal_sel_e l_sel,     // what to drive
  output logic      active,    // decoupled cycle in progress
  output logic      done,      // one-clock pulse: CAMAC operation finished
  output logic      dwl_load   // one-clock pulse: capture read data into DWL
);
  typedef enum logic [2:0] {
    L_IDLE, L_ASETUP, L_AHOLD, L_DSETUP, L_STROBE, L_END
  } lstate_e;

  lstate_e state;
  logic    req_rd, req_wr, is_wr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= L_IDLE;
      req_rd <= 1'b0;
      req_wr <= 1'b0;
      is_wr  <= 1'b0;
    end else begin
      if (go_rd) req_rd <= 1'b1;
      if (go_wr) req_wr <= 1'b1;
      unique case (state)
        L_IDLE: begin
          req_rd <= go_rd;
          req_wr <= go_wr;
          if (start) state <= L_ASETUP;
        end
        L_ASETUP: state <= L_AHOLD;
        L_AHOLD: begin
          if (req_wr || go_wr) begin
            is_wr <= 1'b1;
            state <= L_DSETUP;
          end else if (req_rd || go_rd) begin
            is_wr <= 1'b0;
            state <= L_STROBE;
          end else if (host_end) begin
            state <= L_IDLE;
          end
        end
        L_DSETUP: state <= L_STROBE;
        L_STROBE: if (s_rply) state <= L_END;
        L_END:    if (!s_rply) state <= L_IDLE;
        default:  state <= L_IDLE;
      endcase
      if (state == L_ASETUP && host_end && !req_rd && !req_wr && !go_rd && !go_wr)
        state <= L_IDLE;
    end
  end

  always_comb begin
    l_sync   = state inside {L_AHOLD, L_DSETUP, L_STROBE, L_END};
    l_din    = (state == L_STROBE) && !is_wr;
    l_dout   = (state == L_STROBE) && is_wr;
    l_oe     = (state inside {L_ASETUP, L_AHOLD}) ||
               (is_wr && state inside {L_DSETUP, L_STROBE});
    l_sel    = (state inside {L_DSETUP, L_STROBE}) ? SD_WDATA : SD_ADDR;
    active   = (state != L_IDLE);
    done     = (state == L_STROBE) && s_rply;
    dwl_load = done && !is_wr;
  end

  // Q-Bus rule on the SCI side: a data strobe only inside SYNC.
  a_strobe_in_sync: assert property (@(posedge clk) disable iff (!rst_n)
    (l_din || l_dout) |-> l_sync);
endmodule
