// tb_backlink_tx: self-checking test of the back-link transmitter. The
// serial output is sliced into 8-bit words at the transmitter's word
// boundary and compared with the expected sequence: IDLE when nothing is
// queued, queued words in order, one word of queue (word_ready low while
// full), and back-to-back words when requests keep up.
module tb_backlink_tx;
  import carlos_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic word_req, word_ready, bl_out;
  logic [7:0] word_in;

  backlink_tx dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (t=%0t)", what, $time); end
  endtask

  // received words, sliced on the transmitter's boundary (from reset)
  logic [7:0] rx_q [$];
  logic [7:0] sh;
  int bitn = 0;
  always @(posedge clk) if (rst_n) begin
    sh = {sh[6:0], bl_out};
    bitn++;
    if (bitn == 8) begin rx_q.push_back(sh); bitn = 0; end
  end

  task automatic send(logic [7:0] w);
    while (!word_ready) @(negedge clk);
    word_req = 1; word_in = w;
    @(negedge clk); word_req = 0;
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] sent [$];
    word_req = 0; word_in = 0;
    @(negedge clk); rst_n = 1;
    repeat (40) @(negedge clk);
    check(rx_q.size() == 5, $sformatf("five words in 40 cycles (%0d)", rx_q.size()));
    foreach (rx_q[i]) check(rx_q[i] == BL_IDLE, "IDLE when nothing is queued");
    rx_q.delete();
    bitn = 0;
    // queue full after one request
    word_req = 1; word_in = BL_RUN;
    @(negedge clk); word_req = 0;
    check(!word_ready, "queue full after a request");
    // a burst of words, back to back
    sent.push_back(BL_RUN);
    for (int i = 0; i < 6; i++) begin
      automatic logic [7:0] w = 8'($urandom);
      send(w);
      sent.push_back(w);
    end
    repeat (40) @(negedge clk);
    begin
      int first = -1;
      foreach (rx_q[i]) if (first < 0 && rx_q[i] != BL_IDLE) first = i;
      check(first >= 0, "queued words seen");
      if (first >= 0) begin
        foreach (sent[j]) check(rx_q[first + j] == sent[j], $sformatf("word %0d in order", j));
        check(rx_q[first + sent.size()] == BL_IDLE, "IDLE after the burst");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
