// sci2280_model: behavioural model of an SCI 2280 systems crate interface
// with a CAMAC branch behind it, as seen from its Q-Bus. For testbenches
// only.
//
// It is a clocked Q-Bus slave. Registers: CSR (bits 12-8 branch and crate,
// bits 4-0 station N, bit 15 Q and bit 7 X of the last CAMAC operation) and
// DBH (CAMAC data bits 24-17). The 1 KiB command space encodes F and A in
// the byte offset ({F, A, 0}); N comes from the CSR. A command-space access
// replies after `branch_delay` clocks, standing for the branch round trip.
// CAMAC is modelled as a 24-bit register per (N, A): F0-F7 read it, F16-F23
// write it (Q=1, X=1); other functions give Q=0, X=1. A read returns bits
// 16-1 on the bus and leaves bits 24-17 in DBH; a write takes bits 24-17 from
// DBH. If the master negates SYNC before the reply the operation is dropped
// and counted in `n_abort`. Protocol errors (a data strobe outside SYNC)
// are counted in `n_proto_err`.
module sci2280_model
  import qi715_pkg::*;
#(
  parameter qaddr_t SCI_BASE = SCI_BASE_DEF
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        sync,
  input  logic        din,
  input  logic        dout,
  input  logic        bs7,
  input  qaddr_t      dal_in,
  output qdata_t      dal_out,
  output logic        rply,
  input  int unsigned branch_delay
);
  logic [15:0] csr;
  logic [7:0]  dbh;
  logic [23:0] mem [512];
  qaddr_t      addr;
  logic        sync_q, busy;
  int unsigned cnt;
  int unsigned n_reads, n_writes, n_abort, n_proto_err, n_cmd, n_reg;
  logic [23:0] last_wdata;
  qaddr_t      last_addr;

  function automatic logic [23:0] init_value(input int idx);
    return 24'(idx * 24'h010203 + 24'h5A0000);
  endfunction

  localparam qaddr_t CSR_A = SCI_BASE + SCI_CSR_OFS;
  localparam qaddr_t DBH_A = SCI_BASE + SCI_DBH_OFS;

  wire is_cmd = !bs7 && (addr >= SCI_BASE) && (addr < CSR_A);
  wire [4:0] f = addr[9:5];
  wire [3:0] a = addr[4:1];
  wire [8:0] idx = {csr[4:0], a};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      csr <= '0; dbh <= '0; rply <= 1'b0; dal_out <= '0; sync_q <= 1'b0;
      busy <= 1'b0; cnt <= 0; addr <= '0;
      n_reads <= 0; n_writes <= 0; n_abort <= 0; n_proto_err <= 0; n_cmd <= 0; n_reg <= 0;
      last_wdata <= '0; last_addr <= '0;
      for (int i = 0; i < 512; i++) mem[i] <= init_value(i);
    end else begin
      sync_q <= sync;
      if ((din || dout) && !sync) n_proto_err <= n_proto_err + 1;
      if (sync && !sync_q) addr <= dal_in;
      if (!sync) begin
        if (busy) n_abort <= n_abort + 1;
        busy <= 1'b0; rply <= 1'b0; cnt <= 0;
      end else if (rply) begin
        if (!din && !dout) rply <= 1'b0;
      end else if ((din || dout) && !busy) begin
        busy <= 1'b1;
        cnt  <= is_cmd ? branch_delay : 1;
      end else if (busy) begin
        if (cnt > 1) cnt <= cnt - 1;
        else begin
          busy <= 1'b0;
          rply <= 1'b1;
          last_addr <= addr;
          if (is_cmd) begin
            n_cmd <= n_cmd + 1;
            if (dout) begin
              n_writes <= n_writes + 1;
              last_wdata <= {dbh, dal_in[15:0]};
              if (f >= 16 && f <= 23) mem[idx] <= {dbh, dal_in[15:0]};
            end else begin
              n_reads <= n_reads + 1;
              dal_out <= mem[idx][15:0];
              if (f <= 7) dbh <= mem[idx][23:16];
            end
            csr[15] <= (f <= 7) || (f >= 16 && f <= 23);
            csr[7]  <= 1'b1;
          end else begin
            n_reg <= n_reg + 1;
            if (addr[AW-1:1] == CSR_A[AW-1:1]) begin
              if (dout) {csr[12:8], csr[4:0]} <= {dal_in[12:8], dal_in[4:0]};
              else dal_out <= csr;
            end else if (addr[AW-1:1] == DBH_A[AW-1:1]) begin
              if (dout) dbh <= dal_in[7:0];
              else dal_out <= {8'h00, dbh};
            end else begin
              dal_out <= 16'hDEAD;
            end
          end
        end
      end
    end
  end
endmodule
