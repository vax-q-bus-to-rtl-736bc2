// qi715_pkg: types and constants shared by the blocks of the Q-Bus to
// SCI 2280 decoupling interface (the "0715").
//
// The interface sits on the VAX Q22 bus in front of an SCI 2280 systems crate
// interface. Everything here is a design choice unless stated: the document
// names the CSR bits (ENABLE, TRANSPARENT, BUSY, DONE) and the register set,
// but gives no bit positions and no addresses.
//
// Bus model: the Q-Bus lines are modelled active high (asserted = 1). The
// multiplexed BDAL lines are split into the direction driven by each side
// (the bus transceivers themselves are outside this logic).
package qi715_pkg;

  localparam int unsigned AW = 22;  // Q22 address width (byte address)
  localparam int unsigned DW = 16;  // Q-Bus data word

  typedef logic [AW-1:0] qaddr_t;
  typedef logic [DW-1:0] qdata_t;

  // 0715 CSR bit positions (chosen here; the document gives only names).
  localparam int unsigned CSR_ENABLE = 0;  // R/W: interface may reach the SCI 2280
  localparam int unsigned CSR_TRANSP = 1;  // R/W: 1 = transparent mode
  localparam int unsigned CSR_DONE   = 7;  // RO : CAMAC operation finished
  localparam int unsigned CSR_BUSY   = 15; // RO : CAMAC operation in progress
  // Power-up value: everything disabled, transparent mode selected.
  localparam qdata_t      CSR_RESET  = qdata_t'(1 << CSR_TRANSP);

  // Default address map (Q22 byte addresses).
  // 0715 registers sit in the I/O page (BBS7 asserted).
  localparam qaddr_t CSR715_ADDR_DEF = 22'o17_764_100;
  localparam qaddr_t DWL715_ADDR_DEF = 22'o17_764_102;
  // SCI 2280 memory window: 1 KiB of CAMAC command space starting at the
  // base, CSR and DBH registers immediately after it.
  localparam qaddr_t SCI_BASE_DEF    = 22'o10_000_000;
  localparam int unsigned SCI_CMD_BYTES = 1024;   // 512 words: F(5 bits) x A(4 bits)
  localparam qaddr_t SCI_CSR_OFS     = 22'(SCI_CMD_BYTES);
  localparam qaddr_t SCI_DBH_OFS     = 22'(SCI_CMD_BYTES + 2);

  // Data returned to the VAX by the read that starts a decoupled CAMAC read.
  localparam qdata_t DUMMY_DATA = '0;

  // Byte offset of a CAMAC command inside the SCI 2280 command space.
  function automatic qaddr_t camac_cmd_ofs(input logic [4:0] f, input logic [3:0] a);
    return qaddr_t'({f, a, 1'b0});
  endfunction

  // Where a decoded host cycle goes.
  typedef enum logic [2:0] {
    RT_NONE  = 3'd0,  // not for us, or disabled: no reply
    RT_CSR   = 3'd1,  // 0715 CSR
    RT_DWL   = 3'd2,  // 0715 DATA_WORD_LOW register
    RT_PASS  = 3'd3,  // passed through to the SCI 2280 unaltered
    RT_LATCH = 3'd4   // CAMAC command decoupled from the VAX cycle
  } route_e;

  // Source of the SCI-side BDAL lines.
  typedef enum logic [1:0] {
    SD_ADDR  = 2'd0,  // latched address
    SD_HOST  = 2'd1,  // VAX write data, passed through
    SD_WDATA = 2'd2   // WRITE_DATA register
  } sdal_sel_e;

endpackage
