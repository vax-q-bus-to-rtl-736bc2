// qi715_top: Q-Bus interface that decouples VAX bus cycles from CAMAC
// cycles run through an SCI 2280 systems crate interface (the "0715").
//
// The VAX side is a Q22 bus slave; the SCI side is a Q22 bus master that
// drives the SCI 2280. A VAX aborts any bus cycle that is not answered
// within 10.5 us, but a CAMAC operation on a long branch takes longer.
// In non-transparent mode the 0715 answers a CAMAC command-space access at
// once (write data latched in WRITE_DATA, dummy data for a read) and keeps
// the SCI 2280 cycle going on its own; the VAX polls BUSY/DONE in the 0715
// CSR and then fetches read data bits 16-1 from the DWL register (bits 24-17
// and Q/X stay in the SCI 2280 DBH and CSR, which are passed through). In
// transparent mode every SCI 2280 access is passed through unaltered and the
// 0715 is invisible except for its CSR.
//
// Blocks: input synchronizers, ADDRESS_DECODE, QBUS_LOGIC (VAX handshake),
// CSR, WRITE_DATA/DWL data path, LATCHED_LOGIC (held SCI-side control) and
// INTERFACE_CONTROL (SCI-side timing and transceiver enables).
// Ports: the Q-Bus lines are active high; BDAL is split per direction with
// an output enable standing for the transceiver direction control. All
// logic runs on `clk` (10 MHz assumed in the testbenches); the control
// strobes in are synchronized with SYNC_STAGES flip-flops. `rst_n` is the
// power-up reset; the VAX's BINIT resets the 0715 to the same state and is
// forwarded to the SCI 2280.
module qi715_top
  import qi715_pkg::*;
#(
  parameter qaddr_t      CSR715_ADDR = CSR715_ADDR_DEF,
  parameter qaddr_t      DWL715_ADDR = DWL715_ADDR_DEF,
  parameter qaddr_t      SCI_BASE    = SCI_BASE_DEF,
  parameter int unsigned SYNC_STAGES = 2
) (
  input  logic   clk,
  input  logic   rst_n,
  // VAX Q-Bus (0715 is a slave)
  input  logic   h_init,
  input  logic   h_sync,
  input  logic   h_din,
  input  logic   h_dout,
  input  logic   h_wtbt,
  input  logic   h_bs7,
  input  qaddr_t h_dal_in,
  output qdata_t h_dal_out,
  output logic   h_dal_oe,
  output logic   h_rply,
  // SCI 2280 Q-Bus (0715 is the master)
  output logic   s_init,
  output logic   s_sync,
  output logic   s_din,
  output logic   s_dout,
  output logic   s_wtbt,
  output logic   s_bs7,
  output qaddr_t s_dal_out,
  output logic   s_dal_oe,
  input  qdata_t s_dal_in,
  input  logic   s_rply,
  // status, for indicators
  output logic   busy,
  output logic   done
);
  logic init_s, sync_s, din_s, dout_s, srply_s;
  logic rst_core_n;

  qi715_sync #(.WIDTH(1), .STAGES(SYNC_STAGES)) u_sync_init (
    .clk, .rst_n, .d(h_init), .q(init_s));
  qi715_sync #(.WIDTH(4), .STAGES(SYNC_STAGES)) u_sync_ctl (
    .clk, .rst_n(rst_core_n), .d({h_sync, h_din, h_dout, s_rply}),
    .q({sync_s, din_s, dout_s, srply_s}));

  assign rst_core_n = rst_n && !init_s;
  assign s_init     = h_init;

  route_e    route;
  qaddr_t    addr_q;
  logic      bs7_q, wtbt_q;
  logic      strobe, strobe_d, acc_rd, acc_wr, rd_phase, cycle_end, fwd_rply;
  qdata_t    csr;
  logic      enable, transparent;
  logic      l_sync, l_din, l_dout, l_oe, l_active, l_done, dwl_load;
  sdal_sel_e l_sel, s_sel;
  logic      pass_active;
  qdata_t    write_data, dwl;

  always_ff @(posedge clk or negedge rst_core_n) begin
    if (!rst_core_n) strobe_d <= 1'b0;
    else             strobe_d <= strobe;
  end

  qi715_address_decode #(
    .CSR715_ADDR(CSR715_ADDR), .DWL715_ADDR(DWL715_ADDR), .SCI_BASE(SCI_BASE)
  ) u_decode (
    .clk, .rst_n(rst_core_n), .sync_raw(h_sync), .strobe, .clear(cycle_end),
    .addr(h_dal_in), .bs7(h_bs7), .wtbt(h_wtbt),
    .enable, .transparent, .sci_busy(l_active),
    .route, .addr_q, .bs7_q, .wtbt_q);

  qi715_qbus_logic u_qbus (
    .clk, .rst_n(rst_core_n), .sync(sync_s), .din(din_s), .dout(dout_s),
    .route, .fwd_rply, .strobe, .acc_rd, .acc_wr, .rply(h_rply),
    .rd_phase, .cycle_end);

  logic cmd_start, csr_wr, go_rd, go_wr, cmd_host_end, cmd_cycle;

  assign cmd_start = strobe_d && (route == RT_LATCH);
  assign csr_wr    = acc_wr && (route == RT_CSR);
  assign go_rd     = acc_rd && (route == RT_LATCH);
  assign go_wr     = acc_wr && (route == RT_LATCH);

  // Remember that the VAX cycle in progress is a decoupled command, so that
  // BUSY is set when it completes.
  always_ff @(posedge clk or negedge rst_core_n) begin
    if (!rst_core_n)    cmd_cycle <= 1'b0;
    else if (cmd_start) cmd_cycle <= 1'b1;
    else if (cycle_end) cmd_cycle <= 1'b0;
  end
  assign cmd_host_end = cycle_end && cmd_cycle;

  qi715_csr u_csr (
    .clk, .rst_n(rst_core_n), .wr(csr_wr), .wdata(h_dal_in[DW-1:0]),
    .cmd_start, .host_end(cmd_host_end), .camac_done(l_done),
    .csr, .enable, .transparent, .busy, .done);

  qi715_datapath u_data (
    .clk, .rst_n(rst_core_n), .h_dal_in(h_dal_in[DW-1:0]), .s_dal_in,
    .addr_q, .csr, .route, .s_sel, .wd_load(go_wr), .dwl_load,
    .h_dal_out, .s_dal_out, .write_data, .dwl);

  qi715_latched_logic u_latch (
    .clk, .rst_n(rst_core_n), .start(cmd_start), .go_rd, .go_wr,
    .host_end(cycle_end), .s_rply(srply_s),
    .l_sync, .l_din, .l_dout, .l_oe, .l_sel, .active(l_active),
    .done(l_done), .dwl_load);

  qi715_interface_control u_ctl (
    .clk, .rst_n(rst_core_n), .route, .start(strobe_d), .h_din(din_s),
    .h_dout(dout_s), .host_end(cycle_end), .rd_phase, .bs7_q, .wtbt_q,
    .s_rply(srply_s), .l_sync, .l_din, .l_dout, .l_oe, .l_sel,
    .s_sync, .s_din, .s_dout, .s_bs7, .s_wtbt, .s_dal_oe, .s_sel,
    .h_dal_oe, .fwd_rply, .pass_active);
endmodule
