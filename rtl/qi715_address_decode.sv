// qi715_address_decode: the ADDRESS_DECODE block.
//
// The Q-Bus address is only guaranteed on BDAL around the leading edge of
// SYNC, so it is captured by a register clocked by that edge (`sync_raw`),
// as in the original, which latches addresses at SYNC time. Once the
// synchronized SYNC reaches the clocked logic (`strobe` pulse) the decode of
// that captured address is registered as the routing decision for the
// cycle:
//   * the 0715 CSR is always reachable (RT_CSR);
//   * with ENABLE clear nothing else answers (RT_NONE);
//   * while a decoupled CAMAC cycle is running on the SCI 2280 side
//     (`sci_busy`) every address other than the 0715 CSR is refused;
//   * in transparent mode the SCI 2280 registers and command space are passed
//     through (RT_PASS) and the 0715 DWL register is invisible;
//   * in non-transparent mode the SCI 2280 CSR and DBH are passed through,
//     the DWL register answers locally (RT_DWL) and command-space addresses
//     start a decoupled CAMAC operation (RT_LATCH).
// The rules follow the document; the address map (parameters) and the
// BBS7 qualification are this design's choice. `clear` returns the route to
// RT_NONE when the VAX ends the cycle. Latency: route and address are valid
// one clock after `strobe`.
module qi715_address_decode
  import qi715_pkg::*;
#(
  parameter qaddr_t CSR715_ADDR = CSR715_ADDR_DEF,
  parameter qaddr_t DWL715_ADDR = DWL715_ADDR_DEF,
  parameter qaddr_t SCI_BASE    = SCI_BASE_DEF
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   sync_raw,     // BSYNC straight from the bus: address capture edge
  input  logic   strobe,       // one-clock pulse: synchronized SYNC seen
  input  logic   clear,        // VAX cycle ended
  input  qaddr_t addr,         // BDAL<21:0> from the VAX
  input  logic   bs7,          // BBS7: I/O page
  input  logic   wtbt,         // BWTBT during the address phase: write cycle
  input  logic   enable,       // CSR ENABLE
  input  logic   transparent,  // CSR TRANSPARENT
  input  logic   sci_busy,     // decoupled CAMAC cycle in progress
  output route_e route,        // latched routing decision
  output qaddr_t addr_q,       // latched address
  output logic   bs7_q,        // latched BBS7
  output logic   wtbt_q        // latched BWTBT
);
  localparam qaddr_t SCI_CSR_ADDR = SCI_BASE + SCI_CSR_OFS;
  localparam qaddr_t SCI_DBH_ADDR = SCI_BASE + SCI_DBH_OFS;

  logic is_csr, is_dwl, is_sci_reg, is_sci_cmd;
  route_e route_d;
  qaddr_t a_cap;
  logic   bs7_cap, wtbt_cap;

  // Address capture at the leading edge of SYNC (no reset: it is always
  // written before the clocked logic looks at it).
  always_ff @(posedge sync_raw) begin
    a_cap    <= addr;
    bs7_cap  <= bs7;
    wtbt_cap <= wtbt;
  end

  always_comb begin
    is_csr     = bs7_cap && (a_cap[AW-1:1] == CSR715_ADDR[AW-1:1]);
    is_dwl     = bs7_cap && (a_cap[AW-1:1] == DWL715_ADDR[AW-1:1]);
    is_sci_reg = !bs7_cap && ((a_cap[AW-1:1] == SCI_CSR_ADDR[AW-1:1]) ||
                              (a_cap[AW-1:1] == SCI_DBH_ADDR[AW-1:1]));
    is_sci_cmd = !bs7_cap && (a_cap >= SCI_BASE) && (a_cap < SCI_CSR_ADDR);

    route_d = RT_NONE;
    if (is_csr)                       route_d = RT_CSR;
    else if (!enable || sci_busy)     route_d = RT_NONE;
    else if (transparent)             route_d = (is_sci_reg || is_sci_cmd) ? RT_PASS : RT_NONE;
    else if (is_sci_reg)              route_d = RT_PASS;
    else if (is_dwl)                  route_d = RT_DWL;
    else if (is_sci_cmd)              route_d = RT_LATCH;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      route  <= RT_NONE;
      addr_q <= '0;
      bs7_q  <= 1'b0;
      wtbt_q <= 1'b0;
    end else if (strobe) begin
      route  <= route_d;
      addr_q <= a_cap;
      bs7_q  <= bs7_cap;
      wtbt_q <= wtbt_cap;
    end else if (clear) begin
      route  <= RT_NONE;
    end
  end
endmodule
