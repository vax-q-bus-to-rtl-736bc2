// qi715_branch_sweep_tb: runs the interface over a range of CAMAC branch
// delays, from a short branch to well past the VAX's 10.5 us timeout, in
// both modes, with all top parameters at their defaults and a 10 MHz clock.
// For each delay it runs CAMAC reads and measures operations per second:
//   * transparent mode: read command (waits), DBH, SCI CSR; must succeed
//     while the branch delay plus interface overhead is below 105 clocks
//     and time out beyond that;
//   * non-transparent mode: read command (early reply), CSR polls until DONE,
//     DWL, DBH, SCI CSR; must succeed at every delay, with the data checked.
// It checks that the decoupled rate at 25 us exceeds the 12,000 ops/s the
// original reached with VAX software, and that on a 3 us branch decoupling
// costs less than a third of the plain transparent rate.
module qi715_branch_sweep_tb;
  import qi715_pkg::*;
  timeunit 1ns;
  timeprecision 1ps;

  localparam int unsigned TIMEOUT   = 105;  // 10.5 us at 10 MHz
  localparam int unsigned SHORT_DLY = 30;   // 3 us
  localparam int unsigned LONG_DLY  = 250;  // 25 us
  localparam real         CLK_HZ    = 10.0e6;
  localparam qaddr_t SCI_CSR = SCI_BASE_DEF + SCI_CSR_OFS;
  localparam qaddr_t SCI_DBH = SCI_BASE_DEF + SCI_DBH_OFS;

  logic clk = 1'b0;
  always #50 clk = ~clk;

  logic   rst_n, h_init, h_sync, h_din, h_dout, h_wtbt, h_bs7;
  qaddr_t h_dal_in;
  qdata_t h_dal_out, s_dal_in;
  logic   h_dal_oe, h_rply;
  logic   s_init, s_sync, s_din, s_dout, s_wtbt, s_bs7, s_dal_oe, s_rply;
  qaddr_t s_dal_out;
  logic   busy, done;
  int unsigned branch_delay;

  qi715_top dut (.*);

  sci2280_model #(.SCI_BASE(SCI_BASE_DEF)) sci (
    .clk, .rst_n(rst_n && !s_init), .sync(s_sync), .din(s_din), .dout(s_dout),
    .bs7(s_bs7), .dal_in(s_dal_out), .dal_out(s_dal_in), .rply(s_rply),
    .branch_delay);

  int checks = 0, failures = 0;
  int m_busy_seen = 0;
  longint unsigned cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL at cycle %0d: %s", cycle, what);
    end
  endtask

  // ---------------- VAX Q-Bus master ----------------
  task automatic q_cycle(input qaddr_t addr, input logic io, input logic wr,
                         input qdata_t wdata, output qdata_t rdata,
                         output bit ok, output int unsigned lat);
    int unsigned n;
    @(posedge clk);
    h_dal_in <= addr; h_bs7 <= io; h_wtbt <= wr;
    @(posedge clk);
    h_sync <= 1'b1;
    @(posedge clk);
    h_bs7 <= 1'b0; h_wtbt <= 1'b0;
    if (wr) h_dal_in <= qaddr_t'(wdata);
    @(posedge clk);
    if (wr) h_dout <= 1'b1; else h_din <= 1'b1;
    n = 0;
    ok = 1'b0;
    rdata = '0;
    while (n < TIMEOUT) begin
      @(posedge clk);
      n++;
      if (h_rply) begin ok = 1'b1; break; end
    end
    lat = n;
    if (ok && !wr) begin
      rdata = h_dal_out;
      check(h_dal_oe, "read data driven towards the VAX");
    end
    h_din <= 1'b0; h_dout <= 1'b0;
    if (ok) begin
      n = 0;
      while (h_rply && n < 50) begin @(posedge clk); n++; end
      check(!h_rply, "RPLY negated after the strobe");
    end
    @(posedge clk);
    h_sync <= 1'b0;
    h_dal_in <= '0;
    repeat (3) @(posedge clk);
  endtask

  task automatic q_write(input qaddr_t addr, input logic io, input qdata_t d, output bit ok);
    qdata_t r; int unsigned l;
    q_cycle(addr, io, 1'b1, d, r, ok, l);
  endtask
  task automatic q_read(input qaddr_t addr, input logic io, output qdata_t d, output bit ok);
    int unsigned l;
    q_cycle(addr, io, 1'b0, '0, d, ok, l);
  endtask

  task automatic csr715_rd(output qdata_t d);
    bit ok;
    q_read(CSR715_ADDR_DEF, 1'b1, d, ok);
    check(ok, "0715 CSR always answers");
  endtask
  task automatic csr715_wr(input qdata_t d);
    bit ok;
    q_write(CSR715_ADDR_DEF, 1'b1, d, ok);
    check(ok, "0715 CSR write answered");
  endtask

  // Poll the 0715 CSR until DONE; returns the number of polls.
  task automatic poll_done(output int polls);
    qdata_t c;
    polls = 0;
    do begin
      csr715_rd(c);
      polls++;
      if (c[CSR_BUSY] && !c[CSR_DONE]) m_busy_seen++;
    end while (!(c[CSR_DONE] && !c[CSR_BUSY]) && polls < 200);
    check(c[CSR_DONE] && !c[CSR_BUSY], "CAMAC operation completes (DONE=1, BUSY=0)");
  endtask

  function automatic qaddr_t cmd_addr(input logic [4:0] f, input logic [3:0] a);
    return SCI_BASE_DEF + camac_cmd_ofs(f, a);
  endfunction

  function automatic logic [23:0] camac_init(input int idx);
    return 24'(idx * 24'h010203 + 24'h5A0000);
  endfunction

  // ---------------- sweep ----------------
  localparam int NDLY = 8;
  localparam int unsigned DLY [NDLY] = '{5, 30, 80, 90, 100, 120, 250, 500};
  localparam int NOPS = 4;

  initial begin : main
    qdata_t d, c;
    bit ok, all_ok;
    int unsigned lat;
    int polls;
    logic [23:0] exp24;
    longint unsigned t0;
    real rate_tr [NDLY];
    real rate_nt [NDLY];
    int n_tr_ok, n_tr_to;

    rst_n = 1'b0; h_init = 1'b0; h_sync = 1'b0; h_din = 1'b0; h_dout = 1'b0;
    h_wtbt = 1'b0; h_bs7 = 1'b0; h_dal_in = '0; branch_delay = SHORT_DLY;
    repeat (5) @(posedge clk);
    rst_n = 1'b1;
    repeat (5) @(posedge clk);
    n_tr_ok = 0; n_tr_to = 0;
    csr715_wr(qdata_t'((1 << CSR_ENABLE) | (1 << CSR_TRANSP)));
    q_write(SCI_CSR, 1'b0, 16'h0203, ok);   // N = 3
    check(ok, "SCI CSR set");

    for (int k = 0; k < NDLY; k++) begin
      branch_delay = DLY[k];
      // transparent
      csr715_wr(qdata_t'((1 << CSR_ENABLE) | (1 << CSR_TRANSP)));
      all_ok = 1'b1;
      t0 = cycle;
      for (int i = 0; i < NOPS; i++) begin
        q_read(cmd_addr(5'd0, 4'(i)), 1'b0, d, ok);
        exp24 = camac_init({5'd3, 4'(i)});
        all_ok &= ok;
        if (ok) check(d == exp24[15:0], "transparent read data");
        q_read(SCI_DBH, 1'b0, d, ok);
        if (all_ok) check(ok && d[7:0] == exp24[23:16], "transparent DBH");
        q_read(SCI_CSR, 1'b0, d, ok);
        check(ok, "SCI CSR read");
      end
      rate_tr[k] = all_ok ? CLK_HZ * NOPS / real'(cycle - t0) : 0.0;
      if (DLY[k] <= 90) check(all_ok, $sformatf("transparent mode works at %0d clocks", DLY[k]));
      if (DLY[k] >= 100) check(!all_ok, $sformatf("transparent mode times out at %0d clocks", DLY[k]));
      if (all_ok) n_tr_ok++; else n_tr_to++;
      // non-transparent
      csr715_wr(qdata_t'(1 << CSR_ENABLE));
      t0 = cycle;
      for (int i = 0; i < NOPS; i++) begin
        q_cycle(cmd_addr(5'd1, 4'(i)), 1'b0, 1'b0, '0, d, ok, lat);
        check(ok && lat < 10, $sformatf("early reply at %0d clocks delay", DLY[k]));
        poll_done(polls);
        exp24 = camac_init({5'd3, 4'(i)});
        q_read(DWL715_ADDR_DEF, 1'b1, d, ok);
        check(ok && d == exp24[15:0], "DWL data");
        q_read(SCI_DBH, 1'b0, d, ok);
        check(ok && d[7:0] == exp24[23:16], "DBH data");
        q_read(SCI_CSR, 1'b0, d, ok);
        check(ok && d[15] && d[7], "Q and X");
      end
      rate_nt[k] = CLK_HZ * NOPS / real'(cycle - t0);
      if (rate_tr[k] == 0.0)
        $display("branch delay %0d clocks (%0.1f us): transparent: VAX timeout, decoupled %0.0f ops/s",
                 DLY[k], real'(DLY[k]) / 10.0, rate_nt[k]);
      else
        $display("branch delay %0d clocks (%0.1f us): transparent %0.0f ops/s, decoupled %0.0f ops/s",
                 DLY[k], real'(DLY[k]) / 10.0, rate_tr[k], rate_nt[k]);
    end
    check(rate_nt[6] > 12000.0, "decoupled rate at 25 us above 12,000 ops/s");
    check(rate_nt[1] > rate_tr[1] * 2.0 / 3.0, "decoupling overhead on a 3 us branch below a third");
    check(n_tr_ok > 0 && n_tr_to > 0, "both transparent outcomes seen");
    check(sci.n_proto_err == 0, "no SCI-side protocol errors");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
