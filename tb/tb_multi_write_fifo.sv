// tb_multi_write_fifo: self-checking test of the multi-word-write FIFO
// against a queue model: random writes of 0..3 words with random reads,
// including full-FIFO drops (whole write dropped, overflow high in the same
// cycle), the reserve kept for priority writes, and first-word-fall-through.
module tb_multi_write_fifo;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  localparam int DEPTH = 8, RESERVE = 2;
  logic [1:0]  wr_cnt;
  logic        wr_prio;
  logic [14:0] wr_data [3];
  logic        rd;
  logic [14:0] rd_data;
  logic        empty, overflow;

  multi_write_fifo #(.WIDTH(15), .DEPTH(DEPTH), .RESERVE(RESERVE)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (t=%0t)", what, $time); end
  endtask

  logic [14:0] model [$];
  int n_drop = 0, n_prio_in_reserve = 0;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int seq = 0;
    wr_cnt = 0; wr_prio = 0; rd = 0; wr_data = '{default: '0};
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 4000; cyc++) begin
      int limit;
      bit exp_fit;
      @(negedge clk);
      // phase-dependent read rate: slow reads fill the FIFO
      rd = ((cyc / 500) % 2 == 0) ? ($urandom_range(3, 0) == 0) : ($urandom_range(1, 0) == 0);
      wr_cnt = 2'($urandom_range(3, 0));
      wr_prio = ($urandom_range(5, 0) == 0);
      for (int i = 0; i < 3; i++) wr_data[i] = 15'(seq + i);
      #1;
      check(empty == (model.size() == 0), "empty flag");
      if (model.size() > 0) check(rd_data == model[0], "head word");
      limit = wr_prio ? DEPTH : DEPTH - RESERVE;
      exp_fit = (model.size() + int'(wr_cnt)) <= limit;
      check(overflow == (wr_cnt != 0 && !exp_fit), "overflow in the cycle of the drop");
      @(posedge clk);
      if (rd && model.size() > 0) void'(model.pop_front());
      if (exp_fit) begin
        if (wr_prio && model.size() + int'(wr_cnt) > DEPTH - RESERVE) n_prio_in_reserve++;
        for (int i = 0; i < int'(wr_cnt); i++) model.push_back(15'(seq + i));
        seq += int'(wr_cnt);
      end else n_drop++;
    end
    check(n_drop > 0, "drops happened");
    check(n_prio_in_reserve > 0, "priority writes used the reserve");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
