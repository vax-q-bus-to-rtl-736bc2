// qi715_latched_logic_tb: checks the SCI-side sequence that LATCHED_LOGIC
// runs for decoupled CAMAC writes and reads: address setup, SYNC, one clock
// of WRITE_DATA setup before DOUT, strobes held for an arbitrarily long
// CAMAC cycle with no VAX activity, exactly one `done` (and for a read one
// `dwl_load`) on the SCI reply, strobe release, then SYNC release once the
// reply is gone. Also: a data strobe that arrives during the address setup
// clock, and a cycle abandoned by the VAX before any data strobe.
module qi715_latched_logic_tb;
  import qi715_pkg::*;
  timeunit 1ns;
  timeprecision 1ps;

  logic clk = 1'b0;
  always #50 clk = ~clk;

  logic      rst_n, start, go_rd, go_wr, host_end, s_rply;
  logic      l_sync, l_din, l_dout, l_oe, active, done, dwl_load;
  sdal_sel_e l_sel;

  qi715_latched_logic dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL at %0t: %s", $time, what); end
  endtask

  int n_done = 0, n_dwl = 0;
  always @(posedge clk) begin
    n_done <= n_done + int'(done);
    n_dwl  <= n_dwl + int'(dwl_load);
  end

  // `go_early`: the data strobe comes in the same clock as start.
  task automatic run(input bit wr, input bit go_early, input int camac_clocks);
    int d0, w0;
    d0 = n_done; w0 = n_dwl;
    @(posedge clk) begin
      start <= 1'b1;
      if (go_early) begin go_wr <= wr; go_rd <= !wr; end
    end
    @(posedge clk) begin start <= 1'b0; go_wr <= 1'b0; go_rd <= 1'b0; end
    #1 check(active && l_oe && !l_sync && l_sel == SD_ADDR, "address setup clock");
    @(posedge clk);
    #1 check(l_sync && l_oe && l_sel == SD_ADDR && !l_din && !l_dout, "SYNC with address");
    if (!go_early) begin
      repeat (2) @(posedge clk);
      #1 check(l_sync && !l_din && !l_dout, "SYNC held waiting for the VAX strobe");
      @(posedge clk) if (wr) go_wr <= 1'b1; else go_rd <= 1'b1;
      @(posedge clk) begin go_wr <= 1'b0; go_rd <= 1'b0; end
    end else begin
      @(posedge clk);
    end
    #1;
    if (wr) begin
      check(l_sync && l_oe && l_sel == SD_WDATA && !l_dout, "WRITE_DATA setup before DOUT");
      @(posedge clk);
      #1;
    end
    check(l_sync && (wr ? l_dout : l_din) && !(wr ? l_din : l_dout), "data strobe latched");
    check(l_oe == wr, "BDAL driven only for a write");
    // the VAX cycle ends; the CAMAC cycle goes on
    @(posedge clk) host_end <= 1'b1;
    @(posedge clk) host_end <= 1'b0;
    repeat (camac_clocks) @(posedge clk);
    #1 check(l_sync && (wr ? l_dout : l_din) && active && n_done == d0,
             $sformatf("strobe still held after %0d clocks", camac_clocks));
    @(posedge clk) s_rply <= 1'b1;
    #1 check(done && (dwl_load == !wr), "done on SCI reply");
    @(posedge clk);
    #1 check(l_sync && !l_din && !l_dout, "strobe released, SYNC held");
    repeat (2) @(posedge clk);
    #1 check(l_sync && active, "SYNC held while RPLY is asserted");
    @(posedge clk) s_rply <= 1'b0;
    @(posedge clk);
    #1 check(!l_sync && !active && !l_oe, "SYNC released after RPLY");
    check(n_done == d0 + 1 && n_dwl == w0 + int'(!wr), "one done, dwl_load for reads only");
  endtask

  initial begin
    rst_n = 0; start = 0; go_rd = 0; go_wr = 0; host_end = 0; s_rply = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    #1 check(!active && !l_sync && !l_oe, "idle after reset");
    run(1'b1, 1'b0, 250);
    run(1'b0, 1'b0, 250);
    run(1'b1, 1'b1, 7);
    run(1'b0, 1'b1, 1000);
    // abandoned: the VAX ends its cycle without a data strobe
    @(posedge clk) start <= 1'b1;
    @(posedge clk) start <= 1'b0;
    repeat (3) @(posedge clk);
    host_end <= 1'b1;
    @(posedge clk) host_end <= 1'b0;
    #1 check(!active && !l_sync, "abandoned cycle released");
    // an SCI reply with nothing running does nothing
    @(posedge clk) s_rply <= 1'b1;
    @(posedge clk) s_rply <= 1'b0;
    #1 check(!active && !done, "stray reply ignored");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
