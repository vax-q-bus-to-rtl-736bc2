// qi715_qbus_logic: the QBUS_LOGIC block, the 0715's slave handshake with
// the VAX.
//
// Inputs are the VAX SYNC, DIN and DOUT after synchronization. When SYNC
// rises the block pulses `strobe` so ADDRESS_DECODE latches the address and
// route. When DIN or DOUT follows, the reply depends on the route:
//   * RT_CSR, RT_DWL, RT_LATCH: the 0715 answers at once (RPLY asserted on
//     the next clock) and pulses `acc_rd` or `acc_wr`. For RT_LATCH this is
//     the early reply that frees the VAX before its 10.5 us timeout while
//     the CAMAC operation continues;
//   * RT_PASS: RPLY waits for the SCI 2280's reply (`fwd_rply`) and is held
//     until both the VAX strobe and the SCI reply have been negated;
//     If the VAX drops its strobe first (it has timed out), no reply is
//     given for that cycle;
//   * RT_NONE: no reply; the VAX times out.
// RPLY is negated after the VAX negates DIN/DOUT; `cycle_end` pulses when
// SYNC is negated (also when the VAX aborts a cycle after a timeout).
// The handshake order is the Q-Bus DATI/DATO protocol; DATIO and block
// transfers are not supported (a design choice: the document's VAX
// software uses single reads and writes).
module qi715_qbus_logic
  import qi715_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   sync,       // synchronized BSYNC from the VAX
  input  logic   din,        // synchronized BDIN
  input  logic   dout,       // synchronized BDOUT
  input  route_e route,      // from ADDRESS_DECODE, valid one clock after strobe
  input  logic   fwd_rply,   // SCI 2280 reply during a pass-through cycle
  output logic   strobe,     // latch address and route
  output logic   acc_rd,     // one-clock pulse: local read answered
  output logic   acc_wr,     // one-clock pulse: local write accepted (data valid)
  output logic   rply,       // BRPLY to the VAX
  output logic   rd_phase,   // VAX read being answered: drive BDAL towards the VAX
  output logic   cycle_end   // one-clock pulse: VAX negated SYNC
);
  typedef enum logic [2:0] {
    S_IDLE, S_ADDR, S_FWD, S_REPLY, S_RELEASE, S_NOREPLY
  } state_e;

  state_e state, state_n;
  logic   is_read, is_read_n;

  always_comb begin
    state_n   = state;
    is_read_n = is_read;
    strobe    = 1'b0;
    acc_rd    = 1'b0;
    acc_wr    = 1'b0;
    cycle_end = 1'b0;
    if (state != S_IDLE && !sync) begin
      state_n   = S_IDLE;
      cycle_end = 1'b1;
    end else begin
      unique case (state)
        S_IDLE: if (sync) begin
          strobe  = 1'b1;
          state_n = S_ADDR;
        end
        S_ADDR: if (din || dout) begin
          is_read_n = din;
          unique case (route)
            RT_CSR, RT_DWL, RT_LATCH: begin
              state_n = S_REPLY;
              acc_rd  = din;
              acc_wr  = !din;
            end
            RT_PASS: state_n = S_FWD;
            default: state_n = S_NOREPLY;
          endcase
        end
        S_FWD: begin
          // A reply that comes after the VAX has given up is not passed on.
          if (!din && !dout)  state_n = S_RELEASE;
          else if (fwd_rply)  state_n = S_REPLY;
        end
        S_REPLY:   if (!din && !dout && !(route == RT_PASS && fwd_rply)) state_n = S_RELEASE;
        S_RELEASE: ;  // wait for SYNC to be negated
        S_NOREPLY: ;  // not ours: stay silent until SYNC is negated
        default:   state_n = S_IDLE;
      endcase
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= S_IDLE;
      is_read <= 1'b0;
    end else begin
      state   <= state_n;
      is_read <= is_read_n;
    end
  end

  assign rply     = (state == S_REPLY);
  assign rd_phase = (state == S_REPLY) && is_read;

  // A reply is only ever given inside a VAX cycle.
  a_rply_in_sync: assert property (@(posedge clk) disable iff (!rst_n) $rose(rply) |-> sync);
endmodule
