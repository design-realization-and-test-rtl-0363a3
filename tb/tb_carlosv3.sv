// tb_carlosv3: self-checking test of one CARLOSv3 chip (8 anodes x 64
// samples). The testbench serializes back-link words itself, drives the JTAG
// port and both hybrid channels, and rebuilds events from the 16-bit output.
// Checks: link lock, events only after a trigger, JTAG-mode-only configuration (thresholds, samples per
// anode), BIST PASS through the JTAG port, RUN-mode event compression on both
// channels against the software model, input ignored in JTAG mode, the JTAG
// switch routing to the serializer port, and the RESET instruction.
module tb_carlosv3;
  import carlos_pkg::*;
  import carlos_ref_pkg::*;

  localparam int A = 8, S = 64;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        bl_in;
  logic        trigger = 0;
  logic [7:0]  ch_data [2];
  logic        ch_valid [2];
  logic        busy;
  logic [14:0] out_data;
  logic        out_en;
  logic        tck, tms, tdi, tdo;
  logic [2:0]  port_tck, port_tms, port_tdi, port_tdo;
  link_state_e link_state;
  logic        run_mode, err;

  carlosv3 #(.ANODES(A), .SAMPLES(S)) dut (.*);

  // downstream devices: one-bit registers
  for (genvar p = 0; p < 3; p++) begin : g_dev
    logic r = 0;
    always @(posedge port_tck[p]) r <= port_tdi[p];
    assign port_tdo[p] = r;
  end

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (t=%0t)", what, $time); end
  endtask

  // ---- back-link serializer in the testbench ----
  logic [7:0] bl_q [$];
  logic [7:0] bl_sh = BL_IDLE;
  int         bl_bit = 0;
  always @(negedge clk) begin
    bl_in = bl_sh[7];
    bl_sh = {bl_sh[6:0], 1'b0};
    bl_bit++;
    if (bl_bit == 8) begin
      bl_bit = 0;
      bl_sh = (bl_q.size() > 0) ? bl_q.pop_front() : BL_IDLE;
    end
  end
  task automatic bl_send(logic [7:0] w);
    bl_q.push_back(w);
    while (bl_q.size() > 0) @(negedge clk);
    repeat (12) @(negedge clk);
  endtask

  // ---- output capture ----
  reconstructor rec [2];
  ev_t got [2][$];
  always @(posedge clk) if (rst_n && out_en) begin
    automatic int c = int'(out_data[14]);
    if (rec[c].push(out_data)) got[c].push_back(rec[c].ev);
  end

  // ---- JTAG master ----
  task automatic tck_cycle(logic tms_v, logic tdi_v, output logic tdo_v);
    tms = tms_v; tdi = tdi_v;
    repeat (4) @(negedge clk);
    tdo_v = tdo;
    tck = 1;
    repeat (4) @(negedge clk);
    tck = 0;
  endtask
  task automatic jtag_reset();
    logic d;
    repeat (6) tck_cycle(1, 0, d);
    tck_cycle(0, 0, d);
  endtask
  task automatic shift(bit is_ir, logic [63:0] din, int n, output logic [63:0] dout);
    logic d;
    dout = '0;
    tck_cycle(1, 0, d);
    if (is_ir) tck_cycle(1, 0, d);
    tck_cycle(0, 0, d);
    tck_cycle(0, 0, d);
    for (int i = 0; i < n; i++) begin
      tck_cycle(i == n - 1, din[i], d);
      dout[i] = d;
    end
    tck_cycle(1, 0, d);
    tck_cycle(0, 0, d);
  endtask
  function automatic logic [CFG_W-1:0] cfg_bits(int lo0, int hi0, int lo1, int hi1, int sm1);
    cfg_t c;
    c.thr_low0 = mk_pbyte(8'(lo0)); c.thr_high0 = mk_pbyte(8'(hi0));
    c.thr_low1 = mk_pbyte(8'(lo1)); c.thr_high1 = mk_pbyte(8'(hi1));
    c.samples_m1 = mk_pbyte(8'(sm1));
    return c;
  endfunction

  task automatic drive(int c, ev_t ev, int n);
    for (int i = 0; i < n; i++) begin
      @(negedge clk); ch_valid[c] = 1; ch_data[c] = ev[i];
    end
    @(negedge clk); ch_valid[c] = 0;
  endtask

  task automatic event_test(int samples, int lo0, int hi0, int lo1, int hi1);
    automatic ev_t e0 = gen_event(A, samples, 4, 18), e1 = gen_event(A, samples, 4, 18);
    automatic int b0 = got[0].size(), b1 = got[1].size();
    automatic int n = 0;
    rec[0].samples = samples; rec[1].samples = samples;
    @(negedge clk); trigger = 1;
    @(negedge clk); trigger = 0;
    fork
      drive(0, e0, A * samples);
      drive(1, e1, A * samples);
    join
    while ((got[0].size() <= b0 || got[1].size() <= b1) && n < 5000) begin @(negedge clk); n++; end
    check(got[0].size() > b0 && got[1].size() > b1, "events out");
    if (got[0].size() > b0 && got[1].size() > b1) begin
      automatic ev_t x0 = ref_compress(e0, A, samples, lo0, hi0);
      automatic ev_t x1 = ref_compress(e1, A, samples, lo1, hi1);
      automatic int bad = 0;
      for (int i = 0; i < A * samples; i++) begin
        if (got[0][b0][i] != x0[i]) bad++;
        if (got[1][b1][i] != x1[i]) bad++;
      end
      check(bad == 0, $sformatf("events match model, %0d samples per anode (%0d differ)", samples, bad));
      check(rec[0].last_flags == 0 && rec[1].last_flags == 0, "no error flags");
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [63:0] d;
    rec[0] = new(A, S); rec[1] = new(A, S);
    ch_valid = '{0, 0}; ch_data = '{0, 0}; tck = 0; tms = 1; tdi = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (60) @(negedge clk);
    check(link_state == LINK_SYNC, "link locked");
    check(!run_mode, "JTAG mode after reset");
    // input ignored in JTAG mode
    drive(0, gen_event(A, S, 2, 10), 20);
    repeat (10) @(negedge clk);
    check(!busy && got[0].size() == 0 && !out_en, "no processing in JTAG mode");
    // BIST through the JTAG port
    jtag_reset();
    shift(1, 64'(IR_BIST), 4, d);
    repeat (4 * S + 20) @(negedge clk);
    shift(0, 0, 8, d);
    check(d[7:0] == BIST_PASS, $sformatf("BIST PASS (%h)", d[7:0]));
    // run with default thresholds
    bl_send(BL_RUN);
    check(run_mode, "RUN mode");
    // samples without a trigger are ignored
    drive(0, gen_event(A, S, 2, 10), 30);
    repeat (10) @(negedge clk);
    check(!busy && got[0].size() == 0 && !out_en, "no event without a trigger");
    event_test(S, 21, 26, 21, 26);
    // configuration: different thresholds per channel, 40 samples per anode
    bl_send(BL_JTAG);
    jtag_reset();
    shift(1, 64'(IR_CONFIG), 4, d);
    shift(0, 64'(cfg_bits(25, 50, 18, 35, 39)), CFG_W, d);
    bl_send(BL_RUN);
    event_test(40, 25, 50, 18, 35);
    // JTAG switch to the serializer port (port 2)
    bl_send(BL_JTAG);
    jtag_reset();
    shift(1, 64'(IR_SWSEL), 4, d);
    shift(0, 64'd3, 2, d);
    shift(1, {59'd0, IR_BYPASS, 1'b0}, 5, d);
    shift(0, 64'h3A5C, 18, d);
    check(d[17:2] == 16'h3A5C, $sformatf("serializer port in the chain (%h)", d[17:0]));
    // RESET instruction: defaults come back
    bl_send(BL_RESET);
    repeat (60) @(negedge clk);
    check(link_state == LINK_SYNC && !run_mode, "relocked in JTAG mode after RESET");
    jtag_reset();
    shift(1, 64'(IR_CONFIG), 4, d);
    shift(0, 64'(cfg_bits(21, 26, 21, 26, S - 1)), CFG_W, d);
    check(d[CFG_W-1:0] == cfg_bits(21, 26, 21, 26, S - 1), "configuration reset by RESET");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
