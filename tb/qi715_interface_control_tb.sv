// qi715_interface_control_tb: checks the SCI-side timing INTERFACE_CONTROL
// generates for pass-through VAX cycles (address setup before SYNC, VAX data
// setup before DOUT, BBS7/WTBT only in the address phase, the SCI reply
// forwarded only while a strobe is being served, strobe and SYNC following
// the VAX, release on an aborted cycle), that a latched cycle's signals
// reach the SCI side unchanged when no pass-through is running, and that
// the VAX-side transceivers follow `rd_phase`.
module qi715_interface_control_tb;
  import qi715_pkg::*;
  timeunit 1ns;
  timeprecision 1ps;

  logic clk = 1'b0;
  always #50 clk = ~clk;

  logic      rst_n, start, h_din, h_dout, host_end, rd_phase, bs7_q, wtbt_q, s_rply;
  logic      l_sync, l_din, l_dout, l_oe;
  sdal_sel_e l_sel, s_sel;
  route_e    route;
  logic      s_sync, s_din, s_dout, s_bs7, s_wtbt, s_dal_oe, h_dal_oe, fwd_rply, pass_active;

  qi715_interface_control dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL at %0t: %s", $time, what); end
  endtask

  task automatic pass_cycle(input bit wr, input bit io, input bit sci_answers);
    @(posedge clk) begin route <= RT_PASS; start <= 1'b1; bs7_q <= io; wtbt_q <= wr; end
    @(posedge clk) start <= 1'b0;
    #1 check(s_dal_oe && s_sel == SD_ADDR && !s_sync && s_bs7 == io && s_wtbt == wr,
             "address setup before SCI SYNC");
    @(posedge clk);
    #1 check(s_sync && s_dal_oe && s_sel == SD_ADDR && s_bs7 == io, "SCI SYNC with address");
    @(posedge clk) if (wr) h_dout <= 1'b1; else h_din <= 1'b1;
    @(posedge clk);
    #1;
    if (wr) begin
      check(s_sync && s_dal_oe && s_sel == SD_HOST && !s_dout && !s_bs7 && !s_wtbt,
            "VAX data setup before SCI DOUT");
      @(posedge clk);
      #1;
    end
    check(s_sync && (wr ? s_dout : s_din) && (s_dal_oe == wr), "SCI strobe follows VAX");
    check(!fwd_rply, "no reply yet");
    if (!sci_answers) begin
      // VAX times out: negates strobe and SYNC
      repeat (20) @(posedge clk);
      h_din <= 1'b0; h_dout <= 1'b0;
      @(posedge clk) host_end <= 1'b1;
      @(posedge clk) host_end <= 1'b0;
      #1 check(!s_sync && !s_din && !s_dout && !s_dal_oe && !pass_active, "released after abort");
      route <= RT_NONE;
      return;
    end
    repeat (5) @(posedge clk);
    s_rply <= 1'b1;
    @(posedge clk);
    #1 check(fwd_rply, "SCI reply forwarded");
    @(posedge clk) begin h_din <= 1'b0; h_dout <= 1'b0; end
    @(posedge clk);
    #1 check(s_sync && !s_din && !s_dout && fwd_rply, "strobe released, reply still forwarded");
    @(posedge clk) s_rply <= 1'b0;
    @(posedge clk);
    #1 check(s_sync && !fwd_rply, "SYNC held until the VAX ends");
    @(posedge clk) host_end <= 1'b1;
    @(posedge clk) begin host_end <= 1'b0; route <= RT_NONE; end
    #1 check(!s_sync && !pass_active, "SYNC follows the VAX");
  endtask

  initial begin
    rst_n = 0; start = 0; h_din = 0; h_dout = 0; host_end = 0; rd_phase = 0; bs7_q = 0;
    wtbt_q = 0; s_rply = 0; l_sync = 0; l_din = 0; l_dout = 0; l_oe = 0; l_sel = SD_ADDR;
    route = RT_NONE;
    repeat (3) @(posedge clk);
    rst_n = 1;
    pass_cycle(1'b0, 1'b0, 1'b1);
    pass_cycle(1'b1, 1'b0, 1'b1);
    pass_cycle(1'b0, 1'b1, 1'b1);
    pass_cycle(1'b0, 1'b0, 1'b0);
    // a start on another route does not open a pass-through
    @(posedge clk) begin route <= RT_LATCH; start <= 1'b1; end
    @(posedge clk) start <= 1'b0;
    #1 check(!pass_active && !s_sync && !s_dal_oe, "no pass-through for RT_LATCH");
    // latched signals drive the SCI side
    for (int i = 0; i < 64; i++) begin
      @(posedge clk);
      {l_sync, l_din, l_dout, l_oe} <= 4'($urandom);
      l_sel <= ($urandom_range(0, 1) != 0) ? SD_WDATA : SD_ADDR;
      s_rply <= 1'($urandom);
      rd_phase <= 1'($urandom);
      bs7_q <= 1'($urandom); wtbt_q <= 1'($urandom);
      #1;
      check(s_sync == l_sync && s_din == l_din && s_dout == l_dout && s_dal_oe == l_oe &&
            s_sel == l_sel, "latched signals passed to the SCI side");
      check(s_bs7 == (l_oe && l_sel == SD_ADDR && bs7_q), "BBS7 only in the address phase");
      check(!fwd_rply, "SCI reply not forwarded outside pass-through");
      check(h_dal_oe == rd_phase, "VAX transceivers follow rd_phase");
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
