// qi715_datapath_tb: checks the WRITE_DATA and DWL registers (load only on
// their strobes, hold otherwise) and both data multiplexers for every route
// and SCI-side source, with random data.
module qi715_datapath_tb;
  import qi715_pkg::*;
  timeunit 1ns;
  timeprecision 1ps;

  logic clk = 1'b0;
  always #50 clk = ~clk;

  logic      rst_n, wd_load, dwl_load;
  qdata_t    h_dal_in, s_dal_in, csr, h_dal_out, write_data, dwl;
  qaddr_t    addr_q, s_dal_out;
  route_e    route;
  sdal_sel_e s_sel;

  qi715_datapath dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    qdata_t wd_exp, dwl_exp, exp;
    rst_n = 0; wd_load = 0; dwl_load = 0; h_dal_in = '0; s_dal_in = '0; csr = '0;
    addr_q = '0; route = RT_NONE; s_sel = SD_ADDR;
    repeat (2) @(posedge clk);
    rst_n = 1;
    wd_exp = '0; dwl_exp = '0;
    for (int i = 0; i < 200; i++) begin
      @(posedge clk);
      h_dal_in <= 16'($urandom); s_dal_in <= 16'($urandom); csr <= 16'($urandom);
      addr_q <= 22'($urandom);
      wd_load <= ($urandom_range(0, 3) == 0);
      dwl_load <= ($urandom_range(0, 3) == 0);
      route <= route_e'($urandom_range(0, 4));
      s_sel <= sdal_sel_e'($urandom_range(0, 2));
      #1;
      // registers before the edge
      check(write_data == wd_exp, "WRITE_DATA holds");
      check(dwl == dwl_exp, "DWL holds");
      case (route)
        RT_CSR:   exp = csr;
        RT_DWL:   exp = dwl_exp;
        RT_PASS:  exp = s_dal_in;
        default:  exp = 16'h0000;   // RT_LATCH: dummy data, RT_NONE: nothing
      endcase
      check(h_dal_out == exp, $sformatf("VAX data for route %s", route.name()));
      case (s_sel)
        SD_ADDR:  check(s_dal_out == addr_q, "SCI BDAL carries the address");
        SD_HOST:  check(s_dal_out == {6'b0, h_dal_in}, "SCI BDAL carries VAX data");
        default:  check(s_dal_out == {6'b0, wd_exp}, "SCI BDAL carries WRITE_DATA");
      endcase
      if (wd_load) wd_exp = h_dal_in;
      if (dwl_load) dwl_exp = s_dal_in;
    end
    @(posedge clk);
    wd_load <= 0; dwl_load <= 0;
    #1;
    check(write_data == wd_exp && dwl == dwl_exp, "last loads");
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
