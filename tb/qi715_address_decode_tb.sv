// qi715_address_decode_tb: checks the routing decision of ADDRESS_DECODE for
// every address class in every mode (ENABLE, TRANSPARENT, CAMAC busy), the
// capture of the address at the SYNC edge (BDAL changes to data right
// after), the one-clock latency after `strobe`, and the return to RT_NONE
// on `clear`. The expected routes come from a table written out here.
module qi715_address_decode_tb;
  import qi715_pkg::*;
  timeunit 1ns;
  timeprecision 1ps;

  logic clk = 1'b0;
  always #50 clk = ~clk;

  logic   rst_n, sync_raw, strobe, clear, bs7, wtbt, enable, transparent, sci_busy;
  qaddr_t addr, addr_q;
  route_e route;
  logic   bs7_q, wtbt_q;

  qi715_address_decode dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", what); end
  endtask

  // address classes: 0 CSR715, 1 DWL715, 2 SCI CSR, 3 SCI DBH, 4 command
  // space, 5 unrelated memory, 6 CSR715 address without BBS7
  localparam qaddr_t SCI_CSR = SCI_BASE_DEF + SCI_CSR_OFS;
  localparam qaddr_t SCI_DBH = SCI_BASE_DEF + SCI_DBH_OFS;

  // expected[class][en][tr][busy]
  function automatic route_e expected(input int cls, input bit en, input bit tr, input bit bz);
    if (cls == 0) return RT_CSR;
    if (!en || bz) return RT_NONE;
    case (cls)
      1: return tr ? RT_NONE : RT_DWL;
      2, 3: return RT_PASS;
      4: return tr ? RT_PASS : RT_LATCH;
      default: return RT_NONE;
    endcase
  endfunction

  task automatic do_cycle(input qaddr_t a, input logic io, input logic w, input route_e exp, input string what);
    @(posedge clk);
    addr <= a; bs7 <= io; wtbt <= w;
    @(posedge clk);
    sync_raw <= 1'b1;
    #10;
    addr <= qaddr_t'(22'h2AAAA);  // data phase follows immediately
    bs7 <= 1'b0; wtbt <= 1'b0;
    @(posedge clk);
    strobe <= 1'b1;
    @(posedge clk);
    strobe <= 1'b0;
    #1;
    check(route == exp, $sformatf("%s: route %s expected %s", what, route.name(), exp.name()));
    check(addr_q == a && bs7_q == io && wtbt_q == w, $sformatf("%s: address latched %o", what, addr_q));
    @(posedge clk);
    check(route == exp, "route held during the cycle");
    clear <= 1'b1; sync_raw <= 1'b0;
    @(posedge clk);
    clear <= 1'b0;
    #1;
    check(route == RT_NONE, "route cleared at cycle end");
  endtask

  initial begin
    qaddr_t a;
    logic io;
    rst_n = 0; sync_raw = 0; strobe = 0; clear = 0; bs7 = 0; wtbt = 0;
    enable = 0; transparent = 0; sci_busy = 0; addr = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int m = 0; m < 8; m++) begin
      enable = m[0]; transparent = m[1]; sci_busy = m[2];
      for (int cls = 0; cls < 7; cls++) begin
        io = 1'b0;
        case (cls)
          0: begin a = CSR715_ADDR_DEF; io = 1'b1; end
          1: begin a = DWL715_ADDR_DEF; io = 1'b1; end
          2: a = SCI_CSR;
          3: a = SCI_DBH;
          4: a = SCI_BASE_DEF + camac_cmd_ofs(5'($urandom_range(0, 31)), 4'($urandom_range(0, 15)));
          5: a = ($urandom_range(0, 1) != 0) ? SCI_BASE_DEF - 2 : SCI_DBH + 2;
          default: a = CSR715_ADDR_DEF;
        endcase
        do_cycle(a, io, 1'($urandom_range(0, 1)), expected(cls, enable, transparent, sci_busy),
                 $sformatf("mode en=%0d tr=%0d busy=%0d class %0d", enable, transparent, sci_busy, cls));
      end
      // command space edges
      do_cycle(SCI_BASE_DEF, 1'b0, 1'b0, expected(4, enable, transparent, sci_busy), "first command word");
      do_cycle(SCI_BASE_DEF + qaddr_t'(SCI_CMD_BYTES - 2), 1'b0, 1'b1,
               expected(4, enable, transparent, sci_busy), "last command word");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
