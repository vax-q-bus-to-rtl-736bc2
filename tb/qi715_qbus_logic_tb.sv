// qi715_qbus_logic_tb: drives QBUS_LOGIC with VAX read and write cycles for
// every route and checks the slave handshake: `strobe` one clock after SYNC,
// an immediate reply (one clock after DIN/DOUT) for local and decoupled
// routes with the matching accept pulse, a reply that waits for and is held
// by the SCI reply on pass-through, silence on RT_NONE, RPLY negation after
// the VAX strobe, no reply to a VAX that has already given up, and
// `cycle_end` when SYNC goes, including an aborted cycle.
module qi715_qbus_logic_tb;
  import qi715_pkg::*;
  timeunit 1ns;
  timeprecision 1ps;

  logic clk = 1'b0;
  always #50 clk = ~clk;

  logic   rst_n, sync, din, dout, fwd_rply;
  route_e route;
  logic   strobe, acc_rd, acc_wr, rply, rd_phase, cycle_end;

  qi715_qbus_logic dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL at %0t: %s", $time, what); end
  endtask

  int n_acc_rd = 0, n_acc_wr = 0, n_strobe = 0, n_end = 0;
  always @(posedge clk) begin
    n_acc_rd <= n_acc_rd + int'(acc_rd);
    n_acc_wr <= n_acc_wr + int'(acc_wr);
    n_strobe <= n_strobe + int'(strobe);
    n_end    <= n_end + int'(cycle_end);
  end

  // One VAX cycle. `sci_delay` < 0 means the SCI never replies.
  task automatic vax_cycle(input route_e r, input bit wr, input int sci_delay,
                           input bit expect_reply, input int exp_lat, input string what);
    int n, e0, s0, ar0, aw0;
    e0 = n_end; s0 = n_strobe; ar0 = n_acc_rd; aw0 = n_acc_wr;
    @(posedge clk) sync <= 1'b1;
    #1 check(strobe, {what, ": strobe in the clock SYNC is seen"});
    @(posedge clk) route <= r;
    #1 check(!strobe, {what, ": strobe lasts one clock"});   // decoder result one clock after strobe
    @(posedge clk) if (wr) dout <= 1'b1; else din <= 1'b1;
    n = 0;
    fork
      begin
        if (sci_delay >= 0) begin
          repeat (sci_delay) @(posedge clk);
          fwd_rply <= 1'b1;
        end
      end
    join_none
    while (!rply && n < 60) begin @(posedge clk); #1; n++; end
    if (expect_reply) begin
      check(rply, {what, ": reply"});
      if (exp_lat >= 0) check(n == exp_lat, $sformatf("%s: reply latency %0d expected %0d", what, n, exp_lat));
      check(rd_phase == !wr, {what, ": read phase drives data"});
    end else begin
      check(!rply, {what, ": no reply"});
    end
    @(posedge clk) begin din <= 1'b0; dout <= 1'b0; end
    if (r == RT_PASS && expect_reply) begin
      repeat (3) @(posedge clk);
      #1 check(rply, {what, ": RPLY held while SCI RPLY is asserted"});
      @(posedge clk) fwd_rply <= 1'b0;
    end
    repeat (3) @(posedge clk);
    #1 check(!rply, {what, ": RPLY negated"});
    @(posedge clk) sync <= 1'b0;
    #1 check(cycle_end, {what, ": cycle_end when SYNC negated"});
    @(posedge clk);
    @(posedge clk) begin route <= RT_NONE; fwd_rply <= 1'b0; end
    disable fork;
    @(posedge clk);
    check(n_end == e0 + 1 && n_strobe == s0 + 1, {what, ": one strobe and one end"});
    if (expect_reply && r != RT_PASS) begin
      check(n_acc_rd == ar0 + int'(!wr) && n_acc_wr == aw0 + int'(wr), {what, ": accept pulse"});
    end else begin
      check(n_acc_rd == ar0 && n_acc_wr == aw0, {what, ": no accept pulse"});
    end
  endtask

  initial begin
    rst_n = 0; sync = 0; din = 0; dout = 0; fwd_rply = 0; route = RT_NONE;
    repeat (3) @(posedge clk);
    rst_n = 1;
    vax_cycle(RT_CSR,   0, -1, 1, 1, "CSR read");
    vax_cycle(RT_CSR,   1, -1, 1, 1, "CSR write");
    vax_cycle(RT_DWL,   0, -1, 1, 1, "DWL read");
    vax_cycle(RT_LATCH, 1, -1, 1, 1, "decoupled write");
    vax_cycle(RT_LATCH, 0, -1, 1, 1, "decoupled read");
    vax_cycle(RT_PASS,  0, 10, 1, -1, "pass read");
    vax_cycle(RT_PASS,  1, 20, 1, -1, "pass write");
    vax_cycle(RT_PASS,  0, -1, 0, -1, "pass read, SCI silent");
    vax_cycle(RT_NONE,  0, 2,  0, -1, "unmapped read");
    vax_cycle(RT_NONE,  1, -1, 0, -1, "unmapped write");
    // pass-through latency: reply one clock after the SCI reply
    begin
      int t_s, t_r;
      @(posedge clk) sync <= 1'b1;
      @(posedge clk) route <= RT_PASS;
      @(posedge clk) din <= 1'b1;
      repeat (7) @(posedge clk);
      fwd_rply <= 1'b1;
      @(posedge clk); #1;
      check(rply, "pass reply one clock after SCI reply");
      din <= 1'b0; fwd_rply <= 1'b0;
      repeat (2) @(posedge clk);
      sync <= 1'b0;
      repeat (2) @(posedge clk);
      route <= RT_NONE;
    end
    // pass-through: the SCI reply comes after the VAX has given up
    begin
      bit seen;
      @(posedge clk) sync <= 1'b1;
      @(posedge clk) route <= RT_PASS;
      @(posedge clk) din <= 1'b1;
      repeat (20) @(posedge clk);
      din <= 1'b0;
      @(posedge clk) fwd_rply <= 1'b1;
      seen = 1'b0;
      repeat (6) begin @(posedge clk); #1; seen |= rply; end
      check(!seen, "no reply once the VAX has dropped DIN");
      sync <= 1'b0;
      @(posedge clk) fwd_rply <= 1'b0;
      repeat (2) @(posedge clk);
      route <= RT_NONE;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
