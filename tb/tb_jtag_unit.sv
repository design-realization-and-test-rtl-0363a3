// tb_jtag_unit: self-checking test of the JTAG unit through its TAP.
// Checks the IR capture value, the bypass register (one-bit delay), the
// configuration chain (reset values read back, a write, a read back of the
// write), the parity check of the configuration, the switch select register,
// the BIST start pulse and the capture of the BIST code, and that the TAP does
// nothing outside JTAG mode.
module tb_jtag_unit;
  import carlos_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic enable, tck, tms, tdi, tdo;
  cfg_t cfg;
  logic cfg_parity_err;
  logic [1:0] sw_sel;
  logic bist_start;
  logic [7:0] bist_code;

  jtag_unit #(.SAMPLES(256)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (t=%0t)", what, $time); end
  endtask

  int n_bist = 0;
  always @(posedge clk) if (rst_n && bist_start) n_bist++;

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

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [63:0] d;
    logic [CFG_W-1:0] c;
    enable = 1; tck = 0; tms = 1; tdi = 0; bist_code = 8'h5C;
    repeat (3) @(negedge clk);
    rst_n = 1;
    check(cfg == cfg_bits(21, 26, 21, 26, 255) && !cfg_parity_err, "reset configuration");
    jtag_reset();
    // IR capture and bypass
    shift(1, 64'(IR_BYPASS), 4, d);
    check(d[3:0] == 4'b0101, $sformatf("IR capture %b", d[3:0]));
    shift(0, 64'hA5F0, 17, d);
    check(d[16:1] == 16'hA5F0 && d[0] == 1'b0, $sformatf("bypass delay %h", d[16:0]));
    // configuration
    shift(1, 64'(IR_CONFIG), 4, d);
    c = cfg_bits(40, 90, 10, 12, 199);
    shift(0, 64'(c), CFG_W, d);
    check(d[CFG_W-1:0] == cfg_bits(21, 26, 21, 26, 255), "configuration reset values shifted out");
    check(cfg == c && !cfg_parity_err, "configuration written");
    check(cfg.thr_low0.val == 40 && cfg.thr_high1.val == 12 && cfg.samples_m1.val == 199, "field order");
    shift(0, 64'(c), CFG_W, d);
    check(d[CFG_W-1:0] == c, "configuration read back");
    c[17] = ~c[17];                        // parity of ch0 high threshold
    shift(0, 64'(c), CFG_W, d);
    repeat (2) @(negedge clk);
    check(cfg_parity_err, "parity error detected");
    c[17] = ~c[17];
    shift(0, 64'(c), CFG_W, d);
    repeat (2) @(negedge clk);
    check(!cfg_parity_err, "parity error cleared by a good write");
    // a wrong parity bit in each of the five fields
    for (int f = 0; f < 5; f++) begin
      c[9 * f + 8] = ~c[9 * f + 8];
      shift(0, 64'(c), CFG_W, d);
      repeat (2) @(negedge clk);
      check(cfg_parity_err, $sformatf("parity error detected in field %0d", f));
      c[9 * f + 8] = ~c[9 * f + 8];
    end
    shift(0, 64'(c), CFG_W, d);
    repeat (2) @(negedge clk);
    check(!cfg_parity_err, "parity error cleared again");
    // switch select
    shift(1, 64'(IR_SWSEL), 4, d);
    shift(0, 64'd3, 2, d);
    check(sw_sel == 2'd3, "switch select written");
    shift(0, 64'd1, 2, d);
    check(d[1:0] == 2'd3 && sw_sel == 2'd1, "switch select read back");
    // BIST
    check(n_bist == 0, "no BIST start yet");
    shift(1, 64'(IR_BIST), 4, d);
    check(n_bist == 1, "BIST start pulse on loading BIST");
    shift(0, 64'h0, 8, d);
    check(d[7:0] == 8'h5C, $sformatf("BIST code captured %h", d[7:0]));
    // outside JTAG mode nothing moves
    enable = 0;
    repeat (4) @(negedge clk);
    shift(1, 64'(IR_CONFIG), 4, d);
    shift(0, 64'(cfg_bits(1, 2, 3, 4, 5)), CFG_W, d);
    check(cfg == c, "configuration kept outside JTAG mode");
    check(tdo == 1'b0, "TDO quiet outside JTAG mode");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
