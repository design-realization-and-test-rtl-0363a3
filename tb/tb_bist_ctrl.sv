// tb_bist_ctrl: self-checking test of the RAM built-in self test. The BIST
// drives four 32-word RAMs; the test checks the result codes (NONE, BUSY,
// PASS), the test length (4*DEPTH + 3 cycles from start to result), that the
// RAMs hold the last pattern afterwards, and that a stuck data bit, a stuck
// parity bit and an address fault on any one RAM give FAIL.
module tb_bist_ctrl;
  import carlos_pkg::*;

  localparam int DEPTH = 32;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start, bist_en, we;
  logic [4:0] waddr, raddr;
  logic [8:0] wdata;
  logic [8:0] ram_q [4];
  logic [8:0] rdata [4];
  logic [7:0] code;

  bist_ctrl #(.DEPTH(DEPTH)) dut (.*);

  // fault injection on the RAM outputs / address
  int   f_ram;      // -1: none
  int   f_kind;     // 0 stuck data bit 3, 1 stuck parity, 2 address bit 2 stuck at 0
  for (genvar i = 0; i < 4; i++) begin : g_ram
    logic [4:0] wa;
    assign wa = (f_ram == i && f_kind == 2) ? (waddr & 5'b11011) : waddr;
    dpram_256x9 #(.DEPTH(DEPTH), .WIDTH(9)) u_ram (
      .clk, .we (we), .waddr (wa), .wdata, .re (1'b1), .raddr, .rdata (ram_q[i]));
    always_comb begin
      rdata[i] = ram_q[i];
      if (f_ram == i && f_kind == 0) rdata[i][3] = 1'b1;
      if (f_ram == i && f_kind == 1) rdata[i][8] = 1'b0;
    end
  end

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (t=%0t)", what, $time); end
  endtask

  task automatic run_bist(output int cycles);
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    cycles = 1;
    check(code == BIST_BUSY && bist_en, "BUSY while running");
    while (code == BIST_BUSY && cycles < 10 * DEPTH) begin @(negedge clk); cycles++; end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cyc;
    start = 0; f_ram = -1; f_kind = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    check(code == BIST_NONE && !bist_en, "NONE before the first run");
    run_bist(cyc);
    check(code == BIST_PASS, $sformatf("PASS on good RAMs (%h)", code));
    check(cyc == 4 * DEPTH + 3, $sformatf("test length %0d cycles", cyc));
    check(!bist_en, "RAM ports released");
    check(g_ram[2].u_ram.mem[5] == {^(8'hAA ^ 8'd5), 8'hAA ^ 8'd5}, "last pattern left in RAM");
    for (int r = 0; r < 4; r++)
      for (int k = 0; k < 3; k++) begin
        f_ram = r; f_kind = k;
        run_bist(cyc);
        check(code == BIST_FAIL, $sformatf("FAIL with fault %0d on RAM %0d", k, r));
      end
    f_ram = -1;
    run_bist(cyc);
    check(code == BIST_PASS, "PASS again without fault");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
