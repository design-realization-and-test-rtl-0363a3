// tb_daq_chain_full: full-size test of the readout chain with every parameter
// at its default (256 anodes x 256 samples per channel, 64-word chip FIFOs).
//
// Both card outputs are looped back to the receiver side. The test locks the
// back-links, enters RUN mode and, after a trigger pulse to both cards, sends one full 256 x 256 event on all four
// channels at one sample per clock, then reprograms both chips over JTAG to
// 200 samples per anode (the event size of the published detector test) and
// sends a 256 x 200 event on all four channels. Each event is rebuilt from
// the 32-bit DAQ stream and compared sample by sample with the software
// model; the trailers must carry no error flags. Two more 256 x 200 events
// follow: uniformly random values on one channel of each card, and
// gaussian-like values on all four channels.
module tb_daq_chain_full;
  import carlos_pkg::*;
  import carlos_ref_pkg::*;

  localparam int A = N_ANODES;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        trigger  [2];
  logic [7:0]  ch_data  [2][2];
  logic        ch_valid [2][2];
  logic        busy     [2];
  logic [14:0] card_out_data [2];
  logic        card_out_en   [2];
  logic        bl_req [2];
  logic [7:0]  bl_word [2];
  logic        bl_ready [2];
  logic        tck [2], tms [2], tdi [2], tdo [2];
  logic [2:0]  port_tck [2], port_tms [2], port_tdi [2], port_tdo [2];
  link_state_e link_state [2];
  logic        run_mode [2], err [2];
  logic [31:0] daq_data;
  logic        daq_valid, daq_overflow;

  daq_chain dut (
    .clk, .rst_n, .trigger, .ch_data, .ch_valid, .busy,
    .card_out_data, .card_out_en,
    .link_in_data (card_out_data), .link_in_en (card_out_en),
    .bl_req, .bl_word, .bl_ready,
    .tck, .tms, .tdi, .tdo, .port_tck, .port_tms, .port_tdi, .port_tdo,
    .link_state, .run_mode, .err, .daq_data, .daq_valid, .daq_overflow
  );

  for (genvar k = 0; k < 2; k++) begin : g_port
    assign port_tdo[k] = port_tdi[k];
  end

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s (t=%0t)", what, $time);
    end
  endtask

  reconstructor rec [2][2];
  ev_t          got [2][2][$];
  int           flags [2][2][$];
  int           n_daq_words = 0;

  task automatic push_word(int card, logic [14:0] w);
    int ch = int'(w[14]);
    if (rec[card][ch].push(w)) begin
      got[card][ch].push_back(rec[card][ch].ev);
      flags[card][ch].push_back(rec[card][ch].last_flags);
    end
  endtask

  always @(posedge clk) begin
    if (daq_valid && rst_n) begin
      automatic int card = int'(daq_data[31]);
      n_daq_words++;
      push_word(card, daq_data[29:15]);
      if (daq_data[30]) push_word(card, daq_data[14:0]);
    end
  end

  task automatic bl_send(int k, logic [7:0] w);
    while (!bl_ready[k]) @(posedge clk);
    @(negedge clk); bl_req[k] = 1; bl_word[k] = w;
    @(negedge clk); bl_req[k] = 0;
  endtask

  task automatic tck_cycle(int k, logic tms_v, logic tdi_v, output logic tdo_v);
    tms[k] = tms_v; tdi[k] = tdi_v;
    repeat (4) @(negedge clk);
    tdo_v = tdo[k];
    tck[k] = 1;
    repeat (4) @(negedge clk);
    tck[k] = 0;
  endtask

  task automatic jtag_shift(int k, bit is_ir, logic [63:0] din, int n, output logic [63:0] dout);
    logic d;
    dout = '0;
    tck_cycle(k, 1, 0, d);                    // from Run-Test/Idle
    if (is_ir) tck_cycle(k, 1, 0, d);
    tck_cycle(k, 0, 0, d);
    tck_cycle(k, 0, 0, d);
    for (int i = 0; i < n; i++) begin
      tck_cycle(k, (i == n - 1), din[i], d);
      dout[i] = d;
    end
    tck_cycle(k, 1, 0, d);
    tck_cycle(k, 0, 0, d);
  endtask

  task automatic jtag_reset(int k);
    logic d;
    repeat (6) tck_cycle(k, 1, 0, d);         // Test-Logic-Reset
    tck_cycle(k, 0, 0, d);                    // Run-Test/Idle
  endtask

  task automatic drive_channel(int k, int c, ev_t ev, int n);
    for (int i = 0; i < n; i++) begin
      @(negedge clk); ch_valid[k][c] = 1; ch_data[k][c] = ev[i];
    end
    @(negedge clk); ch_valid[k][c] = 0;
  endtask

  // event contents: clusters on noise, uniformly random values, or
  // gaussian-like values (sum of four uniform numbers, mean 20)
  typedef enum int {EV_CLUSTERS, EV_UNIFORM, EV_GAUSS} ev_kind_e;

  function automatic ev_t make_event(ev_kind_e kind, int samples);
    ev_t ev;
    if (kind == EV_CLUSTERS) return gen_event(A, samples, 40, 18);
    ev = new[A * samples];
    foreach (ev[i])
      if (kind == EV_UNIFORM) ev[i] = 8'($urandom_range(255, 0));
      else ev[i] = 8'($urandom_range(10, 0) + $urandom_range(10, 0) +
                      $urandom_range(10, 0) + $urandom_range(10, 0));
    return ev;
  endfunction

  // one event on the channels whose bit is set in mask (bit 2*card+channel)
  task automatic run_event(int samples, ev_kind_e kind = EV_CLUSTERS, int mask = 4'hF);
    ev_t ev [2][2];
    int  base [2][2];
    int  n = 0;
    bit  waiting = 1;
    for (int k = 0; k < 2; k++) for (int c = 0; c < 2; c++) begin
      ev[k][c] = make_event(kind, samples);
      base[k][c] = got[k][c].size();
      rec[k][c].samples = samples;
    end
    @(negedge clk); trigger = '{1, 1};
    @(negedge clk); trigger = '{0, 0};
    fork
      if (mask[0]) drive_channel(0, 0, ev[0][0], A * samples);
      if (mask[1]) drive_channel(0, 1, ev[0][1], A * samples);
      if (mask[2]) drive_channel(1, 0, ev[1][0], A * samples);
      if (mask[3]) drive_channel(1, 1, ev[1][1], A * samples);
    join
    while (n < 20000 && waiting) begin
      @(posedge clk); n++;
      waiting = 0;
      for (int k = 0; k < 2; k++) for (int c = 0; c < 2; c++)
        if (mask[2 * k + c] && got[k][c].size() <= base[k][c]) waiting = 1;
    end
    for (int k = 0; k < 2; k++) for (int c = 0; c < 2; c++) if (mask[2 * k + c]) begin
      check(got[k][c].size() > base[k][c], $sformatf("card %0d ch %0d event arrived", k, c));
      if (got[k][c].size() > base[k][c]) begin
        automatic ev_t exp = ref_compress(ev[k][c], A, samples, 21, 26);
        automatic ev_t g = got[k][c][base[k][c]];
        automatic int bad = 0, kept = 0;
        for (int i = 0; i < A * samples; i++) begin
          if (g[i] != exp[i]) bad++;
          if (exp[i] != 0) kept++;
        end
        check(bad == 0, $sformatf("card %0d ch %0d %0dx%0d event matches model (%0d differ, %0d kept)",
                                  k, c, A, samples, bad, kept));
        check(flags[k][c][base[k][c]] == 0, $sformatf("card %0d ch %0d no error flags", k, c));
        $display("card %0d ch %0d: %0d x %0d event, %0d samples kept, %0d words so far",
                 k, c, A, samples, kept, rec[k][c].n_words);
      end
    end
    check(!daq_overflow, "no receiver overflow");
  endtask

  initial begin
    #50ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [63:0] d;
    cfg_t c;
    for (int k = 0; k < 2; k++) begin
      for (int ch = 0; ch < 2; ch++) begin
        rec[k][ch] = new(A, N_SAMPLES);
        ch_valid[k][ch] = 0; ch_data[k][ch] = 0;
      end
      trigger[k] = 0;
      bl_req[k] = 0; bl_word[k] = 0; tck[k] = 0; tms[k] = 1; tdi[k] = 0;
    end
    repeat (5) @(negedge clk);
    rst_n = 1;
    repeat (100) @(negedge clk);
    check(link_state[0] == LINK_SYNC && link_state[1] == LINK_SYNC, "links locked");

    for (int k = 0; k < 2; k++) bl_send(k, BL_RUN);
    repeat (30) @(negedge clk);
    check(run_mode[0] && run_mode[1], "RUN mode");
    run_event(N_SAMPLES);

    // 200 samples per anode, as in the detector test
    for (int k = 0; k < 2; k++) bl_send(k, BL_JTAG);
    repeat (30) @(negedge clk);
    c.thr_low0 = mk_pbyte(8'd21); c.thr_high0 = mk_pbyte(8'd26);
    c.thr_low1 = mk_pbyte(8'd21); c.thr_high1 = mk_pbyte(8'd26);
    c.samples_m1 = mk_pbyte(8'd199);
    for (int k = 0; k < 2; k++) begin
      jtag_reset(k);
      jtag_shift(k, 1, 64'(IR_CONFIG), IR_W, d);
      jtag_shift(k, 0, 64'(c), CFG_W, d);
      bl_send(k, BL_RUN);
    end
    repeat (30) @(negedge clk);
    check(run_mode[0] && run_mode[1], "RUN mode again");
    run_event(200);
    // 50k-sample events of the other published kinds: random values on one
    // channel per card (a channel that keeps nearly every sample uses almost
    // the whole output word rate), gaussian values on all four channels
    run_event(200, EV_UNIFORM, 4'b0101);
    run_event(200, EV_GAUSS, 4'hF);
    $display("DAQ words received: %0d", n_daq_words);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
