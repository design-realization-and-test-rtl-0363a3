// tb_rx_concentrator: self-checking test of the receiver card's
// concentrator. Two random 15-bit word streams (with trailer words at
// random points) are fed in; the 32-bit output is unpacked and each card's
// words must come out complete and in order, paired two per output word,
// with a trailer always closing its pair at once.
module tb_rx_concentrator;
  import carlos_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [14:0] link_data [2];
  logic        link_en [2];
  logic [31:0] out_data;
  logic        out_valid, overflow;

  rx_concentrator dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (t=%0t)", what, $time); end
  endtask

  logic [14:0] sent [2][$];
  logic [14:0] got  [2][$];
  int n_single = 0, n_pair = 0, n_ovf = 0;

  always @(posedge clk) if (rst_n) begin
    if (overflow) n_ovf++;
    if (out_valid) begin
      automatic int k = int'(out_data[31]);
      got[k].push_back(out_data[29:15]);
      if (out_data[30]) begin
        got[k].push_back(out_data[14:0]);
        n_pair++;
      end else begin
        n_single++;
        check(out_data[28:26] == 3'b111, "single word is a trailer");
      end
    end
  end

  function automatic logic [14:0] rand_word(int k, bit trailer);
    logic [14:0] w = 15'($urandom);
    if (trailer) w[13:11] = 3'b111;
    else if (w[13:11] == 3'b111) w[11] = 1'b0;
    return w;
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    link_en = '{0, 0}; link_data = '{0, 0};
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 4000; cyc++) begin
      @(negedge clk);
      for (int k = 0; k < 2; k++) begin
        link_en[k] = ($urandom_range(1, 0) == 0);
        link_data[k] = rand_word(k, $urandom_range(9, 0) == 0);
        if (link_en[k]) sent[k].push_back(link_data[k]);
      end
    end
    @(negedge clk); link_en = '{0, 0};
    // a trailer on each card flushes any held word
    for (int k = 0; k < 2; k++) begin
      @(negedge clk); link_en[k] = 1; link_data[k] = rand_word(k, 1); sent[k].push_back(link_data[k]);
      @(negedge clk); link_en[k] = 0;
    end
    repeat (100) @(negedge clk);
    for (int k = 0; k < 2; k++) begin
      automatic int bad = 0;
      check(got[k].size() == sent[k].size(), $sformatf("card %0d word count %0d/%0d", k, got[k].size(), sent[k].size()));
      foreach (sent[k][i]) if (i < got[k].size() && got[k][i] != sent[k][i]) bad++;
      check(bad == 0, $sformatf("card %0d words in order (%0d differ)", k, bad));
    end
    check(n_pair > 0 && n_single > 0, "pairs and single trailers");
    check(n_ovf == 0, "no overflow at half load");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
