// tb_backlink_rx: self-checking test of the back-link receiver and its
// synchronization state machine. A bit-level driver sends words at an
// arbitrary bit offset and checks every transition against the rules:
// lock after the first IDLE plus three more, an IDLE run broken in ACQ,
// SYNC -> CHECK on one invalid code, CHECK -> SYNC on four consecutive valid
// codes (a count broken by an invalid one), CHECK -> ACQ on three invalid
// codes that are not consecutive, no instruction decoding in CHECK, the RUN
// and JTAG instructions and the RESET instruction with its one-cycle pulse.
module tb_backlink_rx;
  import carlos_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        bl_in;
  link_state_e state;
  logic        run_mode, soft_rst, word_stb;
  logic [7:0]  word;

  backlink_rx dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (state %s, t=%0t)", what, state.name(), $time); end
  endtask

  int n_rst = 0;
  always @(posedge clk) if (rst_n && soft_rst) n_rst++;

  task automatic send_bits(int n, logic v);
    repeat (n) begin @(negedge clk); bl_in = v; end
  endtask

  task automatic send(logic [7:0] w);
    for (int i = 7; i >= 0; i--) begin @(negedge clk); bl_in = w[i]; end
  endtask

  task automatic settle();
    @(posedge clk); #1; // the word's last bit is sampled here
  endtask

  task automatic lock();
    send(BL_IDLE); send(BL_IDLE); send(BL_IDLE);
    check(state == LINK_ACQ, "still ACQ after first IDLE plus two");
    send(BL_IDLE);
    settle();
    check(state == LINK_SYNC, "SYNC after first IDLE plus three");
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bl_in = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    check(state == LINK_ACQ && !run_mode, "ACQ and JTAG mode after reset");
    send_bits(3, 0);                         // arbitrary bit offset
    // an IDLE run broken by another word restarts the count
    send(BL_IDLE); send(BL_IDLE); send(BL_RUN); send(BL_IDLE); send(BL_IDLE);
    settle();
    check(state == LINK_ACQ, "broken IDLE run stays in ACQ");
    send(BL_IDLE);
    settle();
    check(state == LINK_ACQ, "count restarted after broken run");
    send(BL_IDLE);
    settle();
    check(state == LINK_SYNC, "SYNC after four IDLEs from the restart");
    // instructions in SYNC
    send(BL_RUN); settle();
    check(run_mode, "RUN instruction");
    send(BL_JTAG); settle();
    check(!run_mode, "JTAG instruction");
    send(BL_RUN); settle();
    // one invalid code: CHECK
    send(8'h00); settle();
    check(state == LINK_CHECK, "invalid code enters CHECK");
    // instructions are not decoded in CHECK
    send(BL_JTAG); settle();
    check(run_mode, "no decoding in CHECK");
    send(BL_IDLE); send(BL_IDLE);
    send(8'h12); settle();                  // breaks the valid run (1st invalid)
    check(state == LINK_CHECK, "invalid code resets the valid count");
    send(BL_IDLE); send(BL_IDLE); send(BL_IDLE); settle();
    check(state == LINK_CHECK, "three valid codes are not enough");
    send(BL_IDLE); settle();
    check(state == LINK_SYNC, "four consecutive valid codes return to SYNC");
    // three invalid codes, not consecutive: ACQ
    send(8'hFF); settle();
    check(state == LINK_CHECK, "CHECK again");
    send(8'h01); send(BL_IDLE); send(BL_IDLE); send(8'h02); settle();
    check(state == LINK_CHECK, "two invalid codes keep CHECK");
    send(BL_IDLE); send(8'h03); settle();
    check(state == LINK_ACQ, "third invalid code loses the link");
    check(run_mode, "mode kept through link loss");
    // re-lock at a new bit offset, then RESET
    send_bits(5, 1);
    lock();
    send(BL_RESET); settle();
    check(state == LINK_ACQ && !run_mode, "RESET returns to ACQ in JTAG mode");
    check(soft_rst, "soft reset pulse follows RESET");
    @(posedge clk); #1;
    check(n_rst == 1, $sformatf("one soft reset pulse (%0d)", n_rst));
    lock();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
