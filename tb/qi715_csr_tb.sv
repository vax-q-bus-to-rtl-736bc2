// qi715_csr_tb: checks the 0715 CSR: power-up value, read/write of ENABLE
// and TRANSPARENT, BUSY and DONE being read-only, and the BUSY/DONE
// sequence of a decoupled CAMAC operation, including an operation that ends
// before the VAX cycle that started it has completed.
module qi715_csr_tb;
  import qi715_pkg::*;
  timeunit 1ns;
  timeprecision 1ps;

  logic clk = 1'b0;
  always #50 clk = ~clk;

  logic   rst_n, wr, cmd_start, host_end, camac_done;
  qdata_t wdata, csr;
  logic   enable, transparent, busy, done;

  qi715_csr dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s (csr %h)", what, csr); end
  endtask

  localparam int P_WR = 0, P_START = 1, P_END = 2, P_DONE = 3;
  task automatic pulse(input int which);
    @(posedge clk);
    case (which)
      P_WR:    wr <= 1'b1;
      P_START: cmd_start <= 1'b1;
      P_END:   host_end <= 1'b1;
      default: camac_done <= 1'b1;
    endcase
    @(posedge clk);
    {wr, cmd_start, host_end, camac_done} <= '0;
    #1;
  endtask

  task automatic expect_flags(input bit b, input bit d, input string what);
    check(csr[15] == b && csr[7] == d && busy == b && done == d, what);
  endtask

  initial begin
    qdata_t w;
    rst_n = 0; wr = 0; cmd_start = 0; host_end = 0; camac_done = 0; wdata = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    #1;
    check(csr == 16'h0002 && !enable && transparent, "power-up: only TRANSPARENT set");
    for (int i = 0; i < 20; i++) begin
      w = 16'($urandom);
      wdata <= w;
      pulse(P_WR);
      check(csr == {8'h00, 6'h00, w[1], w[0]} && enable == w[0] && transparent == w[1],
            $sformatf("write %h", w));
    end
    wdata <= 16'h0001;   // ENABLE, non-transparent
    pulse(P_WR);
    // normal decoupled operation
    pulse(P_START);
    expect_flags(0, 0, "after start: DONE cleared");
    pulse(P_END);
    expect_flags(1, 0, "VAX cycle done: BUSY set, DONE clear");
    repeat (5) @(posedge clk);
    #1;
    expect_flags(1, 0, "BUSY held while CAMAC runs");
    wdata <= 16'hFFFF;   // writes do not touch BUSY/DONE
    pulse(P_WR);
    expect_flags(1, 0, "BUSY not writable");
    check(enable && transparent, "mode bits written while busy");
    pulse(P_DONE);
    expect_flags(0, 1, "CAMAC done: BUSY clear, DONE set");
    wdata <= 16'h0000;
    pulse(P_WR);
    expect_flags(0, 1, "DONE not writable");
    // CAMAC ends before the VAX cycle
    pulse(P_START);
    expect_flags(0, 0, "second start clears DONE");
    pulse(P_DONE);
    expect_flags(0, 1, "early completion");
    pulse(P_END);
    expect_flags(0, 1, "BUSY not set after completion");
    // host_end without a command does nothing
    pulse(P_END);
    expect_flags(0, 1, "unrelated cycle end");
    // same-clock host_end and camac_done
    pulse(P_START);
    @(posedge clk) begin host_end <= 1; camac_done <= 1; end
    @(posedge clk) begin host_end <= 0; camac_done <= 0; end
    #1;
    expect_flags(0, 1, "simultaneous end and done");
    // reset restores power-up value
    pulse(P_START); pulse(P_END);
    rst_n = 0; #1; rst_n = 1; #1;
    check(csr == 16'h0002, "reset value again");
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
