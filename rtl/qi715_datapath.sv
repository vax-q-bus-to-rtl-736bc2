// qi715_datapath: the WRITE_DATA and DATA_WORD_LOW (DWL) registers and the
// data multiplexers of the 0715.
//
// WRITE_DATA captures CAMAC data bits 16-1 from the VAX write that starts a
// decoupled CAMAC write (`wd_load`) and holds them on the SCI 2280 side for
// the whole CAMAC cycle. DWL captures bits 16-1 returned by the SCI 2280 at
// the end of a decoupled CAMAC read (`dwl_load`); the VAX reads it later.
// Data to the VAX is chosen by the cycle's route: the CSR, DWL, the SCI 2280
// data passed through unaltered, or dummy data for the read that starts a
// decoupled CAMAC read. The SCI-side BDAL lines carry the latched address,
// the VAX data (pass-through) or WRITE_DATA. Registers load on the clock
// edge; the multiplexers are combinational. Function follows the document;
// the dummy value and the reset value (zero) are this design's choice.
module qi715_datapath
  import qi715_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  qdata_t    h_dal_in,   // VAX BDAL<15:0> (write data)
  input  qdata_t    s_dal_in,   // SCI 2280 BDAL<15:0> (read data)
  input  qaddr_t    addr_q,     // latched cycle address
  input  qdata_t    csr,        // 0715 CSR read value
  input  route_e    route,      // route of the current VAX cycle
  input  sdal_sel_e s_sel,      // SCI-side BDAL source
  input  logic      wd_load,    // capture VAX data into WRITE_DATA
  input  logic      dwl_load,   // capture SCI data into DWL
  output qdata_t    h_dal_out,  // data to the VAX
  output qaddr_t    s_dal_out,  // BDAL<21:0> to the SCI 2280
  output qdata_t    write_data, // WRITE_DATA register
  output qdata_t    dwl         // DWL register
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      write_data <= '0;
      dwl        <= '0;
    end else begin
      if (wd_load)  write_data <= h_dal_in;
      if (dwl_load) dwl        <= s_dal_in;
    end
  end

  always_comb begin
    unique case (route)
      RT_CSR:   h_dal_out = csr;
      RT_DWL:   h_dal_out = dwl;
      RT_PASS:  h_dal_out = s_dal_in;
      RT_LATCH: h_dal_out = DUMMY_DATA;
      default:  h_dal_out = '0;
    endcase
  end

  always_comb begin
    unique case (s_sel)
      SD_HOST:  s_dal_out = qaddr_t'(h_dal_in);
      SD_WDATA: s_dal_out = qaddr_t'(write_data);
      default:  s_dal_out = addr_q;
    endcase
  end
endmodule
