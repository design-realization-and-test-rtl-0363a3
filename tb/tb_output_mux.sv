// tb_output_mux: self-checking test of the two-channel output multiplexer.
// Two model FIFOs with random fill; checks one word per cycle, registered
// output, alternation when both channels hold data, order within a channel,
// and that an idle output has enable low.
module tb_output_mux;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [14:0] fifo_data [2];
  logic        fifo_empty [2];
  logic        fifo_rd [2];
  logic [14:0] out_data;
  logic        out_en;

  output_mux dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (t=%0t)", what, $time); end
  endtask

  logic [14:0] q [2][$];
  logic [14:0] exp_q [$];     // words expected on the output, in order
  int seq [2] = '{0, 0};
  int n_alt = 0;
  int last_ch = -1;

  task automatic drive_heads();
    for (int c = 0; c < 2; c++) begin
      fifo_empty[c] = (q[c].size() == 0);
      fifo_data[c]  = fifo_empty[c] ? 15'h0 : q[c][0];
    end
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    drive_heads();
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 3000; cyc++) begin
      bit both;
      @(negedge clk);
      // output of the previous cycle's pop
      if (exp_q.size() > 0) begin
        check(out_en && out_data == exp_q[0], "output word");
        void'(exp_q.pop_front());
      end else check(!out_en, "enable low when idle");
      both = !fifo_empty[0] && !fifo_empty[1];
      #1;
      check(!(fifo_rd[0] && fifo_rd[1]), "one pop per cycle");
      check((fifo_rd[0] || fifo_rd[1]) == (!fifo_empty[0] || !fifo_empty[1]), "pops when data waits");
      for (int c = 0; c < 2; c++) if (fifo_rd[c]) begin
        if (both && last_ch >= 0) begin
          check(c != last_ch, "alternation when both hold data");
          n_alt++;
        end
        last_ch = c;
        exp_q.push_back(q[c][0]);
      end
      @(posedge clk);
      for (int c = 0; c < 2; c++) if (fifo_rd[c]) void'(q[c].pop_front());
      for (int c = 0; c < 2; c++)
        if ($urandom_range(((cyc / 700) % 2) ? 1 : 3, 0) == 0) begin
          q[c].push_back({1'(c), 14'(seq[c])});
          seq[c]++;
        end
      #1 drive_heads();
    end
    check(n_alt > 10, "alternation exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
