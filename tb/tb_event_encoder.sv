// tb_event_encoder: self-checking test of the event encoder. Decisions of
// whole events (8 anodes x 100 samples, from the software model of the
// compressor) are fed in anode-major order with random gaps; the words are
// rebuilt into an event and compared sample by sample. Also checks the event
// numbers, the trailer flags for each error input, the one-cycle latency,
// that JUMP words appear for long gaps, and that after a dropped write
// (err_overflow) the next sample restates its anode.
module tb_event_encoder;
  import carlos_pkg::*;
  import carlos_ref_pkg::*;

  localparam int A = 8, S = 100;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic ev_start, ev_end, dec_valid, dec_keep;
  logic [7:0] dec_anode, dec_time, dec_value;
  logic err_ram_parity, err_cfg_parity, err_overflow, err_lost;
  logic [1:0] wr_cnt;
  logic wr_prio;
  logic [14:0] wr_word [3];

  event_encoder #(.CH(1'b1)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (t=%0t)", what, $time); end
  endtask

  reconstructor rec = new(A, S);
  int n_events = 0;
  bit expect_words;   // a word-producing input was applied in the previous cycle
  always @(posedge clk) if (rst_n) begin
    for (int i = 0; i < int'(wr_cnt); i++) begin
      check(wr_word[i][14] == 1'b1, "channel bit");
      if (rec.push(wr_word[i])) n_events++;
    end
  end

  task automatic idle();
    ev_start = 0; ev_end = 0; dec_valid = 0; dec_keep = 0;
    err_ram_parity = 0; err_cfg_parity = 0; err_overflow = 0; err_lost = 0;
  endtask

  task automatic run(ev_t exp, int err_sel, bit gaps);
    @(negedge clk); idle(); ev_start = 1;
    @(negedge clk); idle();
    #1 check(wr_cnt == 1 && wr_word[0][13:11] == 3'b110 && wr_prio, "EVENT word one cycle after ev_start");
    for (int i = 0; i < A * S; i++) begin
      if (gaps) while ($urandom_range(2, 0) == 0) begin @(negedge clk); idle(); end
      @(negedge clk); idle();
      dec_valid = 1; dec_anode = 8'(i / S); dec_time = 8'(i % S);
      dec_keep = exp[i] != 0; dec_value = exp[i];
      if (i == 300) begin
        case (err_sel)
          0: err_ram_parity = 1;
          1: err_cfg_parity = 1;
          2: err_overflow = 1;
          3: err_lost = 1;
          default: ;
        endcase
      end
    end
    @(negedge clk); idle();
    @(negedge clk); ev_end = 1;
    @(negedge clk); idle();
    #1 check(wr_cnt == 1 && wr_word[0][13:11] == 3'b111 && wr_prio, "TRAILER word one cycle after ev_end");
    @(negedge clk);
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    idle(); dec_anode = 0; dec_time = 0; dec_value = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int e = 0; e < 6; e++) begin
      automatic ev_t raw = gen_event(A, S, 5, 24);
      automatic ev_t exp = ref_compress(raw, A, S, 21, 26);
      automatic int bad = 0;
      automatic int err_sel = (e < 4) ? e : -1;
      run(exp, err_sel, e % 2);
      check(n_events == e + 1, "event closed");
      check(rec.last_ev_num == e, $sformatf("event number %0d", rec.last_ev_num));
      if (err_sel != 2)
        for (int i = 0; i < A * S; i++) if (rec.ev[i] != exp[i]) bad++;
      check(bad == 0, $sformatf("event %0d rebuilt (%0d differ)", e, bad));
      check(rec.last_flags == ((err_sel >= 0) ? (1 << err_sel) : 0),
            $sformatf("trailer flags %h", rec.last_flags));
    end
    check(rec.errors == 0, "stream well formed");
    check(rec.n_jump > 0, "JUMP words used");
    // a dropped write: the next sample restates its anode
    @(negedge clk); idle(); ev_start = 1;
    @(negedge clk); idle(); dec_valid = 1; dec_keep = 1; dec_anode = 3; dec_time = 5; dec_value = 40;
    @(negedge clk); idle(); dec_valid = 1; dec_keep = 1; dec_anode = 3; dec_time = 6; dec_value = 41;
    #1 check(wr_cnt == 2 && wr_word[0][13:11] == 3'b100, "ANODE and DATA for the first sample of an anode");
    err_overflow = 1;
    @(negedge clk); idle();
    #1 check(wr_cnt == 2 && wr_word[0][13:11] == 3'b100, "anode restated after a drop");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
