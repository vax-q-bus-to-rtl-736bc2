// qi715_csr: the 0715 control/status register.
//
// A 16-bit register, always reachable by the VAX. ENABLE and TRANSPARENT are
// read/write mode bits; BUSY and DONE are status flags that only the
// hardware changes:
//   * `cmd_start` (a decoupled CAMAC command was decoded) clears DONE;
//   * `host_end` (the VAX cycle that started it has completed) sets BUSY,
//     unless the CAMAC operation has already finished;
//   * `camac_done` (the SCI 2280 replied) sets DONE and clears BUSY.
// So BUSY=1/DONE=0 means "in progress", BUSY=0/DONE=1 means "finished, data
// available", as the document describes. The flag behaviour follows the
// document; bit positions, the power-up value (ENABLE clear, TRANSPARENT
// set) and the effect of BINIT (same as power-up) are this design's choice.
// The other CSR bits are unused and read as 0. Writes take effect on the
// clock edge where `wr` is high; reads are combinational.
module qi715_csr
  import qi715_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,        // power-up reset or BINIT
  input  logic   wr,           // VAX write to the CSR
  input  qdata_t wdata,
  input  logic   cmd_start,    // decoupled CAMAC command decoded
  input  logic   host_end,     // VAX cycle of that command has completed
  input  logic   camac_done,   // SCI 2280 signalled end of CAMAC operation
  output qdata_t csr,          // read value
  output logic   enable,
  output logic   transparent,
  output logic   busy,
  output logic   done
);
  logic mode_en, mode_tr, busy_q, done_q, pending;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mode_en <= CSR_RESET[CSR_ENABLE];
      mode_tr <= CSR_RESET[CSR_TRANSP];
      busy_q  <= 1'b0;
      done_q  <= 1'b0;
      pending <= 1'b0;
    end else begin
      if (wr) begin
        mode_en <= wdata[CSR_ENABLE];
        mode_tr <= wdata[CSR_TRANSP];
      end
      if (cmd_start) begin
        done_q  <= 1'b0;
        pending <= 1'b1;
      end
      if (host_end && pending && !camac_done) busy_q <= 1'b1;
      if (camac_done) begin
        busy_q  <= 1'b0;
        done_q  <= 1'b1;
        pending <= 1'b0;
      end
    end
  end

  always_comb begin
    csr             = '0;
    csr[CSR_ENABLE] = mode_en;
    csr[CSR_TRANSP] = mode_tr;
    csr[CSR_DONE]   = done_q;
    csr[CSR_BUSY]   = busy_q;
  end

  assign enable      = mode_en;
  assign transparent = mode_tr;
  assign busy        = busy_q;
  assign done        = done_q;
endmodule
