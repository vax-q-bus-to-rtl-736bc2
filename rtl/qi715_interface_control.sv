// qi715_interface_control: the INTERFACE_CONTROL block.
//
// Generates the SCI 2280 side of the Q-Bus and the transceiver enables.
// Two sources drive the SCI side, never both at once:
//   * pass-through (route RT_PASS: transparent mode, or the SCI 2280 CSR/DBH
//     in either mode): the VAX cycle is replayed towards the SCI 2280 with
//     the VAX waiting. The latched address gets one clock of setup before
//     SYNC; VAX write data one clock before DOUT. The SCI 2280's RPLY is
//     returned as `fwd_rply`, so the VAX sees wait states until the SCI
//     2280 answers, exactly as if the 0715 were absent (and it can time
//     out on a long CAMAC cycle). When the VAX negates its strobe the SCI
//     strobe follows, and SCI SYNC follows the VAX's SYNC;
//   * the LATCHED_LOGIC signals for a decoupled CAMAC operation.
// BBS7 and WTBT are forwarded during the SCI address phase. `h_dal_oe`
// enables the transceivers towards the VAX while a read is answered (it is
// `rd_phase` from QBUS_LOGIC, passed on unchanged),
// `s_dal_oe` those towards the SCI 2280 while an address or write data is
// driven. BINIT is forwarded by the top level. The block's role follows the
// document; the clocked sequencing is this design's own.
module qi715_interface_control
  import qi715_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  route_e    route,     // route of the current VAX cycle
  input  logic      start,     // route has just been decoded
  input  logic      h_din,     // synchronized VAX DIN
  input  logic      h_dout,    // synchronized VAX DOUT
  input  logic      host_end,  // VAX negated SYNC
  input  logic      rd_phase,  // QBUS_LOGIC is answering a VAX read
  input  logic      bs7_q,     // latched BBS7
  input  logic      wtbt_q,    // latched BWTBT
  input  logic      s_rply,    // synchronized SCI 2280 RPLY
  input  logic      l_sync,    // LATCHED_LOGIC outputs
  input  logic      l_din,
  input  logic      l_dout,
  input  logic      l_oe,
  input  sdal_sel_e l_sel,
  output logic      s_sync,    // Q-Bus control towards the SCI 2280
  output logic      s_din,
  output logic      s_dout,
  output logic      s_bs7,
  output logic      s_wtbt,
  output logic      s_dal_oe,  // transceiver enable towards the SCI 2280
  output sdal_sel_e s_sel,     // SCI BDAL source
  output logic      h_dal_oe,  // transceiver enable towards the VAX
  output logic      fwd_rply,  // SCI reply for a pass-through VAX cycle
  output logic      pass_active
);
  typedef enum logic [2:0] {
    P_IDLE, P_ASETUP, P_AHOLD, P_DSETUP, P_STROBE, P_SEND, P_WAIT
  } pstate_e;

  pstate_e pstate;
  logic    p_wr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pstate <= P_IDLE;
      p_wr   <= 1'b0;
    end else if (host_end) begin
      pstate <= P_IDLE;
    end else begin
      unique case (pstate)
        P_IDLE:   if (start && route == RT_PASS) pstate <= P_ASETUP;
        P_ASETUP: pstate <= P_AHOLD;
        P_AHOLD: begin
          if (h_dout) begin
            p_wr   <= 1'b1;
            pstate <= P_DSETUP;
          end else if (h_din) begin
            p_wr   <= 1'b0;
            pstate <= P_STROBE;
          end
        end
        P_DSETUP: pstate <= P_STROBE;
        P_STROBE: if (!h_din && !h_dout) pstate <= P_SEND;
        P_SEND:   if (!s_rply) pstate <= P_WAIT;
        P_WAIT:   ;  // hold SCI SYNC until the VAX negates SYNC
        default:  pstate <= P_IDLE;
      endcase
    end
  end

  logic p_sync, p_din, p_dout, p_oe, addr_phase;
  sdal_sel_e p_sel;

  always_comb begin
    p_sync = pstate inside {P_AHOLD, P_DSETUP, P_STROBE, P_SEND, P_WAIT};
    p_din  = (pstate == P_STROBE) && !p_wr;
    p_dout = (pstate == P_STROBE) && p_wr;
    p_oe   = (pstate inside {P_ASETUP, P_AHOLD}) ||
             (p_wr && pstate inside {P_DSETUP, P_STROBE});
    p_sel  = (pstate inside {P_DSETUP, P_STROBE}) ? SD_HOST : SD_ADDR;
    pass_active = (pstate != P_IDLE);

    s_sync   = p_sync | l_sync;
    s_din    = p_din  | l_din;
    s_dout   = p_dout | l_dout;
    s_dal_oe = p_oe   | l_oe;
    s_sel    = pass_active ? p_sel : l_sel;
    addr_phase = s_dal_oe && (s_sel == SD_ADDR);
    s_bs7    = addr_phase && bs7_q;
    s_wtbt   = addr_phase && wtbt_q;
    h_dal_oe = rd_phase;
    fwd_rply = s_rply && (pstate inside {P_STROBE, P_SEND});
  end

  // The decoder never lets a pass-through and a latched cycle overlap.
  a_no_overlap: assert property (@(posedge clk) disable iff (!rst_n)
    !(pass_active && l_sync));
endmodule
