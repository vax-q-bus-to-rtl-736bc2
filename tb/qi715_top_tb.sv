// qi715_top_tb: end-to-end test of the 0715 interface between a VAX Q-Bus
// master (tasks in this file) and an SCI 2280 with a CAMAC branch
// (sci2280_model). The top runs with all parameters at their defaults.
//
// The clock is 10 MHz, so the VAX's 10.5 us bus timeout is 105 clocks and
// the branch delays of the tests are 3 us (30 clocks, a short branch) and
// 25 us (250 clocks, the long branch of the bench test). The VAX master
// aborts any cycle whose reply has not come within the timeout.
// Exercised and counted: refusal while ENABLE is clear, transparent
// pass-through on a short branch, a VAX timeout in transparent mode on a
// long branch, DWL hidden in transparent mode, decoupled CAMAC writes and
// reads on the long branch with early replies, BUSY seen while the CAMAC
// cycle runs, refusal of other addresses while BUSY, DONE polling, DWL and
// DBH read-back, Q/X in the SCI 2280 CSR and BINIT reset. A final loop
// measures the decoupled CAMAC read rate with a 25 us branch.
module qi715_top_tb;
  timeunit 1ns;
  timeprecision 1ps;
  import qi715_pkg::*;

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
  longint unsigned cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  // mechanism counters
  int m_disabled, m_pass, m_pass_timeout, m_dwl_hidden, m_latch_wr, m_latch_rd;
  int m_busy_seen, m_busy_lockout, m_early_reply, m_binit;

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

  // ---------------- test sequence ----------------
  initial begin : main
    qdata_t d, c;
    bit ok;
    int unsigned lat;
    int polls;
    logic [23:0] exp24;
    longint unsigned t0, t1;
    int nops;
    real rate;

    rst_n = 1'b0; h_init = 1'b0; h_sync = 1'b0; h_din = 1'b0; h_dout = 1'b0;
    h_wtbt = 1'b0; h_bs7 = 1'b0; h_dal_in = '0; branch_delay = SHORT_DLY;
    repeat (5) @(posedge clk);
    rst_n = 1'b1;
    repeat (5) @(posedge clk);

    // Power-up: only the CSR works.
    csr715_rd(c);
    check(c == CSR_RESET, $sformatf("power-up CSR %h", c));
    q_read(SCI_CSR, 1'b0, d, ok);
    check(!ok, "SCI 2280 unreachable while ENABLE is clear");
    if (!ok) m_disabled++;
    q_read(cmd_addr(5'd0, 4'd0), 1'b0, d, ok);
    check(!ok, "command space unreachable while ENABLE is clear");
    check(sci.n_cmd == 0 && sci.n_reg == 0, "nothing reached the SCI 2280");

    // Transparent mode, short branch: everything passes through.
    csr715_wr(qdata_t'((1 << CSR_ENABLE) | (1 << CSR_TRANSP)));
    csr715_rd(c);
    check(c[CSR_ENABLE] && c[CSR_TRANSP] && !c[CSR_BUSY], "ENABLE and TRANSPARENT set");
    q_write(SCI_CSR, 1'b0, 16'h0305, ok);  // B,C = 3, N = 5
    check(ok, "transparent write to SCI CSR");
    q_read(SCI_CSR, 1'b0, d, ok);
    check(ok && d[12:8] == 5'h03 && d[4:0] == 5'h05, $sformatf("SCI CSR read-back %h", d));
    q_write(SCI_DBH, 1'b0, 16'h00C3, ok);
    check(ok, "transparent write to DBH");
    q_cycle(cmd_addr(5'd16, 4'd2), 1'b0, 1'b1, 16'h1234, d, ok, lat);
    check(ok, "transparent CAMAC write on a 3 us branch completes within the timeout");
    $display("transparent write, 3 us branch: VAX answered %0d clocks after DOUT", lat);
    check(lat > SHORT_DLY, $sformatf("transparent write waits for the CAMAC reply (%0d clocks)", lat));
    check(sci.mem[{5'd5, 4'd2}] == 24'hC31234, $sformatf("CAMAC register written %h", sci.mem[{5'd5, 4'd2}]));
    if (ok) m_pass++;
    q_read(cmd_addr(5'd0, 4'd2), 1'b0, d, ok);
    check(ok && d == 16'h1234, $sformatf("transparent CAMAC read low word %h", d));
    q_read(SCI_DBH, 1'b0, d, ok);
    check(ok && d[7:0] == 8'hC3, $sformatf("transparent read of DBH %h", d));
    q_read(SCI_CSR, 1'b0, d, ok);
    check(ok && d[15] && d[7], "Q and X in SCI CSR");
    if (ok) m_pass++;
    q_read(DWL715_ADDR_DEF, 1'b1, d, ok);
    check(!ok, "DWL invisible in transparent mode");
    if (!ok) m_dwl_hidden++;

    // Transparent mode, long branch: the VAX times out.
    branch_delay = LONG_DLY;
    q_read(cmd_addr(5'd0, 4'd3), 1'b0, d, ok);
    check(!ok, "transparent CAMAC read on a 25 us branch times out");
    if (!ok) m_pass_timeout++;
    repeat (3) @(posedge clk);
    check(sci.n_abort == 1, $sformatf("aborted cycle dropped by the SCI 2280 (%0d)", sci.n_abort));
    repeat (10) @(posedge clk);
    check(!s_sync && !s_din && !s_dout, "SCI side released after the timeout");

    // Non-transparent mode, long branch: decoupled CAMAC write.
    csr715_wr(qdata_t'(1 << CSR_ENABLE));
    q_write(SCI_CSR, 1'b0, 16'h0709, ok);  // N = 9
    check(ok, "SCI CSR passes through in non-transparent mode");
    q_write(SCI_DBH, 1'b0, 16'h00AB, ok);
    check(ok, "DBH passes through in non-transparent mode");
    q_cycle(cmd_addr(5'd17, 4'd4), 1'b0, 1'b1, 16'hBEEF, d, ok, lat);
    check(ok, "decoupled CAMAC write answered");
    $display("decoupled write: VAX answered %0d clocks after DOUT", lat);
    check(lat < 10, $sformatf("early reply latency %0d clocks", lat));
    if (ok && lat < TIMEOUT) m_early_reply++;
    check(s_sync && s_dout, "SCI side cycle still held after the VAX cycle");
    check(s_dal_out[15:0] == 16'hBEEF && s_dal_oe, "WRITE_DATA held on the SCI bus");
    csr715_rd(c);
    check(c[CSR_BUSY] && !c[CSR_DONE], $sformatf("BUSY=1 DONE=0 during CAMAC cycle (CSR %h)", c));
    if (c[CSR_BUSY]) m_busy_seen++;
    q_read(SCI_CSR, 1'b0, d, ok);
    check(!ok, "SCI CSR refused while BUSY");
    if (!ok) m_busy_lockout++;
    q_read(DWL715_ADDR_DEF, 1'b1, d, ok);
    check(!ok, "DWL refused while BUSY");
    poll_done(polls);
    check(polls >= 1, "DONE polled");
    check(sci.mem[{5'd9, 4'd4}] == 24'hABBEEF, $sformatf("decoupled CAMAC write data %h", sci.mem[{5'd9, 4'd4}]));
    check(sci.n_abort == 1, "decoupled write not aborted");
    m_latch_wr++;
    q_read(SCI_CSR, 1'b0, d, ok);
    check(ok && d[15] && d[7], "Q and X after decoupled write");

    // Decoupled CAMAC read.
    exp24 = camac_init({5'd9, 4'd6});
    q_cycle(cmd_addr(5'd2, 4'd6), 1'b0, 1'b0, '0, d, ok, lat);
    check(ok && d == DUMMY_DATA, $sformatf("decoupled read returns dummy data %h", d));
    check(lat < 10, $sformatf("early read reply latency %0d", lat));
    if (ok && lat < TIMEOUT) m_early_reply++;
    poll_done(polls);
    q_read(DWL715_ADDR_DEF, 1'b1, d, ok);
    check(ok && d == exp24[15:0], $sformatf("DWL %h expected %h", d, exp24[15:0]));
    q_read(SCI_DBH, 1'b0, d, ok);
    check(ok && d[7:0] == exp24[23:16], $sformatf("DBH %h expected %h", d[7:0], exp24[23:16]));
    q_read(SCI_CSR, 1'b0, d, ok);
    check(ok && d[15] && d[7], "Q and X after decoupled read");
    m_latch_rd++;
    // A non-data function gives Q=0.
    q_cycle(cmd_addr(5'd9, 4'd0), 1'b0, 1'b0, '0, d, ok, lat);
    poll_done(polls);
    q_read(SCI_CSR, 1'b0, d, ok);
    check(ok && !d[15] && d[7], "Q=0 X=1 for F9");

    // Rate of decoupled CAMAC reads on the 25 us branch (read, poll, DWL, DBH, CSR).
    nops = 8;
    t0 = cycle;
    for (int i = 0; i < nops; i++) begin
      q_cycle(cmd_addr(5'd0, 4'(i)), 1'b0, 1'b0, '0, d, ok, lat);
      poll_done(polls);
      q_read(DWL715_ADDR_DEF, 1'b1, d, ok);
      exp24 = camac_init({5'd9, 4'(i)});
      if (i == 4) exp24 = 24'hABBEEF;
      check(ok && d == exp24[15:0], $sformatf("loop DWL %h expected %h", d, exp24[15:0]));
      q_read(SCI_DBH, 1'b0, d, ok);
      check(ok && d[7:0] == exp24[23:16], "loop DBH");
      q_read(SCI_CSR, 1'b0, d, ok);
      check(ok, "loop CSR");
    end
    t1 = cycle;
    rate = CLK_HZ * nops / real'(t1 - t0);
    $display("decoupled CAMAC read with 25 us branch: %0d clocks/op, %0.0f ops/s",
             (t1 - t0) / nops, rate);
    check(rate > 12000.0, "bus interface alone supports more than 12,000 ops/s at 25 us");
    check(rate < 1.0e6 / 25.0, "rate bounded by the branch delay");

    // Transparent mode again, then BINIT restores the power-up state.
    csr715_wr(qdata_t'((1 << CSR_ENABLE) | (1 << CSR_TRANSP)));
    branch_delay = SHORT_DLY;
    q_read(cmd_addr(5'd0, 4'd4), 1'b0, d, ok);
    check(ok && d == 16'hBEEF, "transparent read after mode switch");
    if (ok) m_pass++;
    @(posedge clk) h_init <= 1'b1;
    repeat (5) @(posedge clk);
    h_init <= 1'b0;
    repeat (5) @(posedge clk);
    csr715_rd(c);
    check(c == CSR_RESET, $sformatf("CSR after BINIT %h", c));
    if (c == CSR_RESET) m_binit++;

    check(sci.n_proto_err == 0, "no SCI-side protocol errors");

    $display("mechanisms: disabled=%0d pass=%0d pass_timeout=%0d dwl_hidden=%0d latch_wr=%0d latch_rd=%0d busy_seen=%0d busy_lockout=%0d early_reply=%0d binit=%0d",
             m_disabled, m_pass, m_pass_timeout, m_dwl_hidden, m_latch_wr, m_latch_rd,
             m_busy_seen, m_busy_lockout, m_early_reply, m_binit);
    check(m_disabled > 0, "mechanism: refusal while disabled");
    check(m_pass > 0, "mechanism: transparent pass-through");
    check(m_pass_timeout > 0, "mechanism: VAX timeout in transparent mode");
    check(m_dwl_hidden > 0, "mechanism: DWL hidden in transparent mode");
    check(m_latch_wr > 0, "mechanism: decoupled write");
    check(m_latch_rd > 0, "mechanism: decoupled read");
    check(m_busy_seen > 0, "mechanism: BUSY while CAMAC runs");
    check(m_busy_lockout > 0, "mechanism: refusal while BUSY");
    check(m_early_reply > 0, "mechanism: early reply");
    check(m_binit > 0, "mechanism: BINIT");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
