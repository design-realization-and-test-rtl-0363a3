// tb_daq_chain: end-to-end test of the readout chain at reduced event size
// (16 anodes x 64 samples; every other parameter at its default).
//
// The optical links are modelled as wires from each card's output word to the
// receiver side. Each downstream JTAG device is modelled as a one-bit shift
// register. The test drives the chain through:
//   back-link: acquisition and lock (ACQ -> SYNC), an invalid code (SYNC ->
//     CHECK), recovery (CHECK -> SYNC), loss (CHECK -> ACQ), the RESET command;
//   mode switches between JTAG and RUN mode; samples without a trigger;
//   JTAG: configuration write and read back, a parity error in the
//     configuration, the JTAG switch to a downstream port, the BIST;
//   events on all four channels with the thresholds of the published test and
//     with other thresholds and a shorter anode, compared sample by sample
//     with a software model after rebuilding them from the 32-bit DAQ stream;
//   an event whose every sample survives (FIFO overflow) and input arriving
//     during the end-of-event flush (lost data).
// Every mechanism is counted; one that never happens counts as a failure.
module tb_daq_chain;
  import carlos_pkg::*;
  import carlos_ref_pkg::*;

  localparam int A = 16;
  localparam int S = 64;

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

  daq_chain #(.ANODES(A), .SAMPLES(S)) dut (
    .clk, .rst_n, .trigger, .ch_data, .ch_valid, .busy,
    .card_out_data, .card_out_en,
    .link_in_data (card_out_data), .link_in_en (card_out_en),
    .bl_req, .bl_word, .bl_ready,
    .tck, .tms, .tdi, .tdo, .port_tck, .port_tms, .port_tdi, .port_tdo,
    .link_state, .run_mode, .err, .daq_data, .daq_valid, .daq_overflow
  );

  // downstream JTAG devices: one-bit registers
  for (genvar k = 0; k < 2; k++) begin : g_dev
    for (genvar p = 0; p < 3; p++) begin : g_port
      logic r = 0;
      always @(posedge port_tck[k][p]) r <= port_tdi[k][p];
      assign port_tdo[k][p] = r;
    end
  end

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s (t=%0t)", what, $time);
    end
  endtask

  // ---------------- mechanism counters ----------------
  int n_sync = 0, n_check = 0, n_recover = 0, n_loss = 0, n_reset = 0;
  int n_run = 0, n_jtag = 0, n_overflow_flag = 0, n_lost_flag = 0, n_cfg_perr_flag = 0;
  int n_jump = 0, n_anode_words = 0, n_busy = 0, n_bist_pass = 0, n_switch = 0, n_cfg_write = 0;

  link_state_e prev_state [2];
  logic        prev_run [2];
  always @(posedge clk) begin
    for (int k = 0; k < 2; k++) begin
      if (rst_n) begin
        if (prev_state[k] == LINK_ACQ   && link_state[k] == LINK_SYNC)  n_sync++;
        if (prev_state[k] == LINK_SYNC  && link_state[k] == LINK_CHECK) n_check++;
        if (prev_state[k] == LINK_CHECK && link_state[k] == LINK_SYNC)  n_recover++;
        if (prev_state[k] == LINK_CHECK && link_state[k] == LINK_ACQ)   n_loss++;
        if (prev_state[k] == LINK_SYNC  && link_state[k] == LINK_ACQ)   n_reset++;
        if (!prev_run[k] && run_mode[k]) n_run++;
        if (prev_run[k] && !run_mode[k]) n_jtag++;
        if (busy[k]) n_busy++;
      end
      prev_state[k] = link_state[k];
      prev_run[k]   = run_mode[k];
    end
  end

  // ---------------- DAQ stream capture ----------------
  reconstructor rec [2][2];
  ev_t          got [2][2][$];
  int           flags [2][2][$];

  task automatic push_word(int card, logic [14:0] w);
    int ch = int'(w[14]);
    if (rec[card][ch].push(w)) begin
      got[card][ch].push_back(rec[card][ch].ev);
      flags[card][ch].push_back(rec[card][ch].last_flags);
    end
  endtask

  int n_out [2] = '{0, 0};
  always @(posedge clk) begin
    for (int k = 0; k < 2; k++) if (card_out_en[k] && rst_n) n_out[k]++;
    if (daq_valid && rst_n) begin
      automatic int card = int'(daq_data[31]);
      push_word(card, daq_data[29:15]);
      if (daq_data[30]) push_word(card, daq_data[14:0]);
    end
  end

  // ---------------- back-link ----------------
  task automatic bl_send(int k, logic [7:0] w);
    while (!bl_ready[k]) @(posedge clk);
    @(negedge clk); bl_req[k] = 1; bl_word[k] = w;
    @(negedge clk); bl_req[k] = 0;
  endtask

  task automatic wait_state(int k, link_state_e s, int max_cycles, string what);
    int n = 0;
    while (link_state[k] != s && n < max_cycles) begin @(posedge clk); n++; end
    check(link_state[k] == s, what);
  endtask

  // ---------------- JTAG master ----------------
  task automatic tck_cycle(int k, logic tms_v, logic tdi_v, output logic tdo_v);
    tms[k] = tms_v; tdi[k] = tdi_v;
    repeat (4) @(negedge clk);
    tdo_v = tdo[k];                  // sampled at the rising TCK edge
    tck[k] = 1;
    repeat (4) @(negedge clk);
    tck[k] = 0;
  endtask

  task automatic jtag_reset(int k);
    logic d;
    repeat (6) tck_cycle(k, 1, 0, d);
    tck_cycle(k, 0, 0, d);           // Run-Test/Idle
  endtask

  // shifts n bits (LSB first) through IR (is_ir) or DR, returns the bits out
  task automatic jtag_shift(int k, bit is_ir, logic [63:0] din, int n, output logic [63:0] dout);
    logic d;
    dout = '0;
    tck_cycle(k, 1, 0, d);                    // Select-DR
    if (is_ir) tck_cycle(k, 1, 0, d);         // Select-IR
    tck_cycle(k, 0, 0, d);                    // Capture
    tck_cycle(k, 0, 0, d);                    // Shift
    for (int i = 0; i < n; i++) begin
      tck_cycle(k, (i == n - 1), din[i], d);  // last bit exits to Exit1
      dout[i] = d;
    end
    tck_cycle(k, 1, 0, d);                    // Update
    tck_cycle(k, 0, 0, d);                    // Run-Test/Idle
  endtask

  function automatic logic [CFG_W-1:0] cfg_bits(int lo0, int hi0, int lo1, int hi1, int sm1);
    cfg_t c;
    c.thr_low0 = mk_pbyte(8'(lo0)); c.thr_high0 = mk_pbyte(8'(hi0));
    c.thr_low1 = mk_pbyte(8'(lo1)); c.thr_high1 = mk_pbyte(8'(hi1));
    c.samples_m1 = mk_pbyte(8'(sm1));
    return c;
  endfunction

  task automatic write_cfg(int k, logic [CFG_W-1:0] c, output logic [63:0] old);
    logic [63:0] d;
    jtag_shift(k, 1, 64'(IR_CONFIG), IR_W, d);
    jtag_shift(k, 0, 64'(c), CFG_W, old);
    n_cfg_write++;
  endtask

  // ---------------- event driving ----------------
  int n_trigger = 0, n_untriggered = 0;
  task automatic pulse_trigger(int k);
    @(negedge clk); trigger[k] = 1;
    @(negedge clk); trigger[k] = 0;
    n_trigger++;
  endtask

  task automatic drive_channel(int k, int c, ev_t ev, int n, bit gaps);
    for (int i = 0; i < n; i++) begin
      if (gaps) while ($urandom_range(3, 0) == 0) begin
        @(negedge clk); ch_valid[k][c] = 0;
      end
      @(negedge clk); ch_valid[k][c] = 1; ch_data[k][c] = ev[i];
    end
    @(negedge clk); ch_valid[k][c] = 0;
  endtask

  task automatic wait_events(int k, int want0, int want1, int max_cycles);
    int n = 0;
    while ((got[k][0].size() < want0 || got[k][1].size() < want1) && n < max_cycles) begin
      @(posedge clk); n++;
    end
    check(got[k][0].size() >= want0 && got[k][1].size() >= want1,
          $sformatf("card %0d events arrived", k));
  endtask

  // runs one event on all four channels and compares
  task automatic run_event(int samples, int lo [2][2], int hi [2][2], int exp_flag_bit, bit compare);
    ev_t ev [2][2];
    int  base [2][2];
    for (int k = 0; k < 2; k++) for (int c = 0; c < 2; c++) begin
      ev[k][c] = gen_event(A, samples, 6, 18);
      base[k][c] = got[k][c].size();
    end
    fork
      pulse_trigger(0);
      pulse_trigger(1);
    join
    fork
      drive_channel(0, 0, ev[0][0], A * samples, 1);
      drive_channel(0, 1, ev[0][1], A * samples, 0);
      drive_channel(1, 0, ev[1][0], A * samples, 1);
      drive_channel(1, 1, ev[1][1], A * samples, 1);
    join
    for (int k = 0; k < 2; k++) begin
      wait_events(k, base[k][0] + 1, base[k][1] + 1, 20000);
      for (int c = 0; c < 2; c++) begin
        if (got[k][c].size() <= base[k][c]) continue;
        if (compare) begin
          ev_t exp = ref_compress(ev[k][c], A, samples, lo[k][c], hi[k][c]);
          int bad = 0;
          ev_t g = got[k][c][base[k][c]];
          for (int i = 0; i < A * samples; i++) if (g[i] != exp[i]) begin
            bad++;
            if (bad < 4) $display("  a=%0d t=%0d got %0d exp %0d in %0d", i / samples, i % samples, g[i], exp[i], ev[k][c][i]);
          end
          check(bad == 0, $sformatf("card %0d ch %0d event matches model (%0d samples differ)", k, c, bad));
        end
        if (exp_flag_bit < 0)
          check(flags[k][c][base[k][c]] == 0, $sformatf("card %0d ch %0d no error flags (%h)", k, c, flags[k][c][base[k][c]]));
      end
    end
  endtask

  int lo_def [2][2] = '{'{21, 21}, '{21, 21}};
  int hi_def [2][2] = '{'{26, 26}, '{26, 26}};

  initial begin
    #20ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [63:0] d;
    for (int k = 0; k < 2; k++) begin
      for (int c = 0; c < 2; c++) begin
        rec[k][c] = new(A, S);
        ch_valid[k][c] = 0; ch_data[k][c] = 0;
      end
      trigger[k] = 0;
      bl_req[k] = 0; bl_word[k] = 0; tck[k] = 0; tms[k] = 1; tdi[k] = 0;
    end
    repeat (5) @(negedge clk);
    rst_n = 1;

    // ---- link acquisition: transmitters send IDLE by themselves ----
    for (int k = 0; k < 2; k++) wait_state(k, LINK_SYNC, 200, "link locks after IDLE words");
    check(!run_mode[0] && !run_mode[1], "JTAG mode after reset");

    // ---- BIST on card 0 ----
    jtag_reset(0);
    jtag_shift(0, 1, 64'(IR_BIST), IR_W, d);
    repeat (4 * S + 40) @(negedge clk);
    jtag_shift(0, 0, 64'h0, 8, d);
    check(d[7:0] == BIST_PASS, $sformatf("BIST result code %h", d[7:0]));
    if (d[7:0] == BIST_PASS) n_bist_pass++;

    // ---- configuration read back (reset values) ----
    jtag_reset(1);
    write_cfg(1, cfg_bits(21, 26, 21, 26, S - 1), d);
    check(d[CFG_W-1:0] == cfg_bits(21, 26, 21, 26, S - 1), "configuration reset values read back");

    // ---- JTAG switch: card 1 right hybrid appended ----
    jtag_shift(1, 1, 64'(IR_SWSEL), IR_W, d);
    jtag_shift(1, 0, 64'd2, 2, d);
    begin
      automatic logic [63:0] pat = 64'h0000_0000_0000_B5C3;
      // chain: chip IR (4 bits) then the one-bit device: shift 5 bits
      jtag_shift(1, 1, {59'd0, IR_BYPASS, 1'b0}, 5, d);
      jtag_shift(1, 0, pat, 20, d);
      check(d[19:2] == pat[17:0], $sformatf("two-bit chain through switch %h", d[19:0]));
      if (d[19:2] == pat[17:0]) n_switch++;
      // back to the chip alone
      jtag_shift(1, 1, {59'd0, IR_SWSEL, 1'b0}, 5, d);
      jtag_shift(1, 0, {61'd0, 2'd0, 1'b0}, 3, d);
      jtag_shift(1, 1, 64'(IR_BYPASS), IR_W, d);
      jtag_shift(1, 0, pat, 20, d);
      check(d[19:1] == pat[18:0], "one-bit bypass chain after deselect");
    end

    // ---- first events with the published thresholds ----
    for (int k = 0; k < 2; k++) bl_send(k, BL_RUN);
    repeat (20) @(negedge clk);
    check(run_mode[0] && run_mode[1], "RUN mode entered");
    // samples without a trigger make no event
    begin
      automatic int o = n_out[0];
      drive_channel(0, 0, gen_event(A, S, 2, 10), 40, 0);
      repeat (20) @(negedge clk);
      check(n_out[0] == o && !busy[0], "no event without a trigger");
      if (n_out[0] == o) n_untriggered++;
    end
    run_event(S, lo_def, hi_def, -1, 1);
    run_event(S, lo_def, hi_def, -1, 1);

    // ---- new thresholds and a shorter anode on card 0 ----
    bl_send(0, BL_JTAG);
    repeat (20) @(negedge clk);
    check(!run_mode[0], "JTAG mode entered");
    jtag_reset(0);
    write_cfg(0, cfg_bits(30, 60, 15, 40, 49), d);
    bl_send(0, BL_RUN);
    repeat (20) @(negedge clk);
    begin
      automatic int lo [2][2] = '{'{30, 15}, '{21, 21}};
      automatic int hi [2][2] = '{'{60, 40}, '{26, 26}};
      // card 1 keeps S samples: run cards separately
      automatic ev_t e0 = gen_event(A, 50, 6, 18), e1 = gen_event(A, 50, 6, 18);
      automatic int b0 = got[0][0].size(), b1 = got[0][1].size();
      rec[0][0].samples = 50; rec[0][1].samples = 50;
      pulse_trigger(0);
      fork
        drive_channel(0, 0, e0, A * 50, 1);
        drive_channel(0, 1, e1, A * 50, 0);
      join
      wait_events(0, b0 + 1, b1 + 1, 20000);
      if (got[0][0].size() > b0 && got[0][1].size() > b1) begin
        automatic ev_t x0 = ref_compress(e0, A, 50, 30, 60), x1 = ref_compress(e1, A, 50, 15, 40);
        automatic int bad = 0;
        for (int i = 0; i < A * 50; i++) begin
          if (got[0][0][b0][i] != x0[i]) bad++;
          if (got[0][1][b1][i] != x1[i]) bad++;
          if (bad > 0 && bad < 6 && (got[0][0][b0][i] != x0[i] || got[0][1][b1][i] != x1[i]))
            $display("i=%0d a=%0d t=%0d got %0d/%0d exp %0d/%0d in %0d/%0d", i, i/50, i%50, got[0][0][b0][i], got[0][1][b1][i], x0[i], x1[i], e0[i], e1[i]);
        end
        check(bad == 0, $sformatf("new thresholds, 50 samples per anode (%0d differ)", bad));
      end
      rec[0][0].samples = S; rec[0][1].samples = S;
    end

    // ---- configuration parity error on card 0 ----
    bl_send(0, BL_JTAG);
    repeat (20) @(negedge clk);
    jtag_reset(0);
    begin
      automatic logic [CFG_W-1:0] c = cfg_bits(21, 26, 21, 26, S - 1);
      c[8] = ~c[8];                              // wrong parity on ch0 low threshold
      write_cfg(0, c, d);
    end
    bl_send(0, BL_RUN);
    repeat (20) @(negedge clk);
    check(err[0], "error output set by configuration parity");
    begin
      automatic ev_t e = gen_event(A, S, 4, 18);
      automatic int b = got[0][0].size();
      pulse_trigger(0);
      drive_channel(0, 0, e, A * S, 0);
      wait_events(0, b + 1, 0, 20000);
      if (got[0][0].size() > b) begin
        check(flags[0][0][b][FLAG_CFG_PARITY], "trailer reports configuration parity error");
        if (flags[0][0][b][FLAG_CFG_PARITY]) n_cfg_perr_flag++;
      end
    end

    // ---- RESET command on card 0: defaults back, link re-acquired ----
    bl_send(0, BL_RESET);
    wait_state(0, LINK_ACQ, 100, "RESET returns link to ACQ");
    wait_state(0, LINK_SYNC, 200, "link locks again after RESET");
    check(!run_mode[0] && !err[0], "RESET clears mode and error");
    jtag_reset(0);
    write_cfg(0, cfg_bits(21, 26, 21, 26, S - 1), d);
    check(d[CFG_W-1:0] == cfg_bits(21, 26, 21, 26, S - 1), "RESET restores configuration");

    // ---- link errors on card 1 ----
    bl_send(1, 8'h00);                           // invalid: SYNC -> CHECK
    wait_state(1, LINK_CHECK, 40, "invalid code enters CHECK");
    repeat (4) bl_send(1, BL_IDLE);              // four valid: back to SYNC
    wait_state(1, LINK_SYNC, 60, "four valid codes return to SYNC");
    bl_send(1, 8'h00);
    wait_state(1, LINK_CHECK, 40, "invalid code enters CHECK again");
    bl_send(1, 8'h01); bl_send(1, BL_IDLE); bl_send(1, 8'h02); bl_send(1, 8'h03);
    wait_state(1, LINK_ACQ, 60, "three invalid codes lose the link");
    wait_state(1, LINK_SYNC, 200, "link re-acquired");
    check(run_mode[1], "card 1 stays in RUN mode through link loss");

    // ---- both cards in RUN mode: overflow and lost data ----
    bl_send(0, BL_RUN);
    repeat (20) @(negedge clk);
    begin
      automatic ev_t hot = new[A * S];
      automatic int b [2][2];
      foreach (hot[i]) hot[i] = 8'd200;
      for (int c = 0; c < 2; c++) b[0][c] = got[0][c].size();
      pulse_trigger(0);
      fork
        drive_channel(0, 0, hot, A * S, 0);
        drive_channel(0, 1, hot, A * S, 0);
      join
      wait_events(0, b[0][0] + 1, b[0][1] + 1, 40000);
      for (int c = 0; c < 2; c++) if (got[0][c].size() > b[0][c]) begin
        check(flags[0][c][b[0][c]][FLAG_OVERFLOW], $sformatf("overflow flagged on ch %0d", c));
        if (flags[0][c][b[0][c]][FLAG_OVERFLOW]) n_overflow_flag++;
      end
    end
    begin
      automatic ev_t e = gen_event(A, S, 5, 18);
      automatic int b = got[1][1].size();
      pulse_trigger(1);
      drive_channel(1, 1, e, A * S, 0);
      // next trigger, then three samples while the channel still flushes
      pulse_trigger(1);
      repeat (3) begin @(negedge clk); ch_valid[1][1] = 1; ch_data[1][1] = 8'd99; end
      @(negedge clk); ch_valid[1][1] = 0;
      wait_events(1, 0, b + 1, 20000);
      if (got[1][1].size() > b) begin
        automatic ev_t exp = ref_compress(e, A, S, 21, 26);
        automatic int bad = 0;
        for (int i = 0; i < A * S; i++) if (got[1][1][b][i] != exp[i]) bad++;
        check(bad == 0, "event intact when extra input is dropped");
        check(flags[1][1][b][FLAG_LOST], "trailer reports lost input");
        if (flags[1][1][b][FLAG_LOST]) n_lost_flag++;
      end
    end
    // a clean event after the error cases
    run_event(S, lo_def, hi_def, -1, 1);

    $display("card words: %0d %0d", n_out[0], n_out[1]);
    // ---- stream sanity ----
    for (int k = 0; k < 2; k++) for (int c = 0; c < 2; c++) begin
      check(rec[k][c].errors == 0, $sformatf("card %0d ch %0d stream well formed (%0d errors)", k, c, rec[k][c].errors));
      n_jump += rec[k][c].n_jump;
      n_anode_words += rec[k][c].n_anode;
    end
    check(!daq_overflow, "no overflow at the concentrator");

    // ---- every mechanism happened ----
    check(n_sync > 0,    "mechanism: link acquisition");
    check(n_check > 0,   "mechanism: SYNC -> CHECK");
    check(n_recover > 0, "mechanism: CHECK -> SYNC");
    check(n_loss > 0,    "mechanism: CHECK -> ACQ");
    check(n_reset > 0,   "mechanism: RESET command");
    check(n_run > 0 && n_jtag > 0, "mechanism: mode switch");
    check(n_bist_pass > 0, "mechanism: BIST");
    check(n_switch > 0,  "mechanism: JTAG switch");
    check(n_cfg_write > 0, "mechanism: configuration write");
    check(n_cfg_perr_flag > 0, "mechanism: configuration parity error");
    check(n_overflow_flag > 0, "mechanism: FIFO overflow");
    check(n_lost_flag > 0, "mechanism: input during flush");
    check(n_busy > 0,    "mechanism: end-of-event flush");
    check(n_jump > 0,    "mechanism: time jump words");
    check(n_anode_words > 0, "mechanism: anode words");
    check(n_trigger > 0, "mechanism: trigger");
    check(n_untriggered > 0, "mechanism: samples without trigger ignored");
    $display("mechanisms: sync=%0d check=%0d recover=%0d loss=%0d reset=%0d run=%0d jtag=%0d bist=%0d switch=%0d cfg=%0d cfgperr=%0d ovf=%0d lost=%0d busy=%0d jump=%0d anode=%0d",
             n_sync, n_check, n_recover, n_loss, n_reset, n_run, n_jtag, n_bist_pass, n_switch,
             n_cfg_write, n_cfg_perr_flag, n_overflow_flag, n_lost_flag, n_busy, n_jump, n_anode_words);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
