// tb_compressor_2d: self-checking test of one compressor channel.
// Drives synthetic events (8 anodes x 40 samples, samples per anode set at
// run time to 40 and 23) with random input gaps, compares every decision
// (position, keep, value) with the software model of the two-threshold rule,
// checks the decision order and count, the flush length (busy), dropped input
// during the flush, and a RAM parity error injected through the BIST port
// into a row that is about to be read.
module tb_compressor_2d;
  import carlos_pkg::*;
  import carlos_ref_pkg::*;

  localparam int A = 8;
  localparam int S = 64;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic       enable, in_valid;
  logic [7:0] in_data, thr_low, thr_high;
  logic [5:0] samples_m1;
  logic       dec_valid, dec_keep, ev_start, ev_end, busy, lost, parity_err;
  logic [7:0] dec_anode, dec_time, dec_value;
  logic       bist_en, bist_we;
  logic [5:0] bist_waddr, bist_raddr;
  logic [8:0] bist_wdata;
  logic [8:0] bist_rdata [2];

  compressor_2d #(.ANODES(A), .SAMPLES(S)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (t=%0t)", what, $time); end
  endtask

  // decision capture
  int n_dec, n_start, n_end, n_lost, n_perr, busy_cycles;
  int exp_idx;
  ev_t exp_ev;
  int  cur_s;
  int  dec_bad;
  always @(posedge clk) begin
    if (rst_n) begin
      if (dec_valid) begin
        int a, t;
        a = exp_idx / cur_s; t = exp_idx % cur_s;
        if (dec_anode != 8'(a) || dec_time != 8'(t) ||
            dec_value != exp_ev[exp_idx] || dec_keep != (exp_ev[exp_idx] != 0 || 0)) begin
          if (!(dec_keep && exp_ev[exp_idx] == 0 && dec_value == 0)) begin
            dec_bad++;
            if (dec_bad < 5)
              $display("decision %0d: got a=%0d t=%0d v=%0d keep=%0d, expected a=%0d t=%0d v=%0d",
                       exp_idx, dec_anode, dec_time, dec_value, dec_keep, a, t, exp_ev[exp_idx]);
          end
        end
        exp_idx++;
        n_dec++;
      end
      if (ev_start) n_start++;
      if (ev_end) n_end++;
      if (lost) n_lost++;
      if (parity_err) n_perr++;
      if (busy) busy_cycles++;
    end
  end

  bit boundary = 0;

  task automatic run_event(int s, bit gaps, bit inject, bit extra);
    automatic ev_t ev = gen_event(A, s, 4, 24);
    // boundary events hold only values next to and at the two thresholds
    if (boundary) foreach (ev[i]) case ($urandom_range(3, 0))
      0: ev[i] = thr_low - 8'd1;
      1: ev[i] = thr_low;
      2: ev[i] = thr_high - 8'd1;
      default: ev[i] = thr_high;
    endcase
    exp_ev = ref_compress(ev, A, s, int'(thr_low), int'(thr_high));
    cur_s = s; exp_idx = 0; n_dec = 0; n_start = 0; n_end = 0; dec_bad = 0;
    n_lost = 0; n_perr = 0; busy_cycles = 0;
    samples_m1 = 6'(s - 1);
    for (int i = 0; i < A * s; i++) begin
      if (gaps) while ($urandom_range(2, 0) == 0) begin @(negedge clk); in_valid = 0; end
      @(negedge clk); in_valid = 1; in_data = ev[i];
      if (inject && i == 3 * s + 5) begin
        // corrupt anode 3, time 9 (just written) in RAM 1 with a bad parity bit
        @(negedge clk); in_valid = 0;
        bist_en = 1; bist_we = 1; bist_waddr = 6'd9; bist_wdata = {~(^ev[3 * s + 9]), ev[3 * s + 9]};
        @(negedge clk); bist_en = 0; bist_we = 0;
      end
    end
    @(negedge clk); in_valid = extra;
    if (extra) begin @(negedge clk); @(negedge clk); in_valid = 0; end
    while (n_end == 0) @(negedge clk);
    repeat (3) @(negedge clk);
    check(n_start == 1, "one ev_start");
    check(n_dec == A * s, $sformatf("decision count %0d", n_dec));
    check(dec_bad == 0, $sformatf("decisions match model (%0d bad)", dec_bad));
    check(busy_cycles == s + 1, $sformatf("flush lasts samples+1 cycles (%0d)", busy_cycles));
    check((n_lost > 0) == extra, "lost pulses only for input during flush");
    check((n_perr > 0) == inject, $sformatf("parity error only when injected (%0d)", n_perr));
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    enable = 1; in_valid = 0; in_data = 0; thr_low = 21; thr_high = 26; samples_m1 = 39;
    bist_en = 0; bist_we = 0; bist_waddr = 0; bist_raddr = 0; bist_wdata = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    run_event(40, 0, 0, 0);
    run_event(40, 1, 0, 0);
    thr_low = 30; thr_high = 80;
    run_event(23, 1, 0, 0);
    run_event(40, 0, 0, 1);
    thr_low = 21; thr_high = 26;
    run_event(40, 0, 1, 0);
    boundary = 1;
    run_event(40, 1, 0, 0);
    boundary = 0;
    // disabled channel ignores input
    enable = 0;
    n_start = 0;
    repeat (5) begin @(negedge clk); in_valid = 1; in_data = 8'd200; end
    @(negedge clk); in_valid = 0;
    repeat (3) @(negedge clk);
    check(n_start == 0 && !busy, "input ignored when disabled");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
