// tb_dpram_256x9: self-checking test of the 256x9 dual-port RAM.
// Fills the whole array with an address-dependent pattern, reads it back,
// then checks read-first behaviour on a simultaneous read and write of the
// same address and that the output holds while re is low.
module tb_dpram_256x9;
  localparam int DEPTH = 256;
  logic clk = 0;
  logic we, re;
  logic [7:0] waddr, raddr;
  logic [8:0] wdata, rdata;
  int checks = 0, failures = 0;

  dpram_256x9 dut (.*);

  always #5 clk = ~clk;

  function automatic logic [8:0] pat(input int a, input int k);
    return 9'((a * 37 + k * 101) ^ (a >> 3));
  endfunction

  task automatic check(input logic [8:0] got, input logic [8:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; re = 0; waddr = 0; raddr = 0; wdata = 0;
    for (int k = 0; k < 2; k++) begin
      for (int a = 0; a < DEPTH; a++) begin
        @(negedge clk); we = 1; waddr = 8'(a); wdata = pat(a, k);
      end
      @(negedge clk); we = 0;
      for (int a = 0; a < DEPTH; a++) begin
        @(negedge clk); re = 1; raddr = 8'(a);
        @(negedge clk); re = 0;
        check(rdata, pat(a, k), $sformatf("readback pass %0d addr %0d", k, a));
      end
    end
    // read-first on a collision
    @(negedge clk); we = 1; re = 1; waddr = 8'd7; raddr = 8'd7; wdata = 9'h1F0;
    @(negedge clk); we = 0; re = 0;
    check(rdata, pat(7, 1), "read-first on collision");
    @(negedge clk);
    check(rdata, pat(7, 1), "output holds with re low");
    @(negedge clk); re = 1;
    @(negedge clk); re = 0;
    check(rdata, 9'h1F0, "new value after collision");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
