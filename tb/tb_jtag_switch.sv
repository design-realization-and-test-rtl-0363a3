// tb_jtag_switch: self-checking test of the JTAG switch. For every select
// value and both modes it drives random TCK/TMS/own-TDO/port-TDO values and
// compares all outputs with the expected routing.
module tb_jtag_switch;
  logic       enable;
  logic [1:0] sel;
  logic       tck, tms, own_tdo, tdo;
  logic [2:0] port_tck, port_tms, port_tdi, port_tdo;

  jtag_switch dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s sel=%0d en=%0d", what, sel, enable); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 400; i++) begin
      enable = (i % 5) != 0;
      sel = 2'(i % 4);
      tck = 1'($urandom); tms = 1'($urandom); own_tdo = 1'($urandom); port_tdo = 3'($urandom);
      #1;
      for (int k = 0; k < 3; k++) begin
        automatic bit on = enable && (sel == k + 1);
        check(port_tck[k] == (on ? tck : 1'b0), "port TCK");
        check(port_tms[k] == (on ? tms : 1'b1), "port TMS");
        check(port_tdi[k] == (on ? own_tdo : 1'b0), "port TDI");
      end
      if (!enable) check(tdo == 1'b0, "TDO quiet");
      else if (sel == 0) check(tdo == own_tdo, "own TDO");
      else check(tdo == port_tdo[sel - 1], "port TDO returned");
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
