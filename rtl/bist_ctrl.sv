// bist_ctrl: built-in self test of the chip's four row-buffer RAMs.
//
// Started by a one-cycle start pulse (from the JTAG unit). It takes the RAM
// ports of both compressor channels (bist_en high) and runs two passes; in
// each it writes every address of all four RAMs with {parity, pattern ^
// address}, pattern 55h in the first pass and AAh in the second, then reads
// every address back and compares data and parity. Every bit of every word
// is thus written with both values and each address holds a different word,
// which exposes stuck bits and address decoder faults. The result is an 8-bit
// code for the JTAG data register: NONE before the first run, BUSY while
// running, PASS or FAIL at the end. The code shows the result 4*DEPTH + 3
// cycles after the start pulse.
// That the BIST is started over JTAG and reports a code on the JTAG output
// follows the chip description; what it tests and the codes are this
// design's own. The compressor must be idle (JTAG mode) during the test.
module bist_ctrl
  import carlos_pkg::*;
#(
  parameter int unsigned DEPTH = N_SAMPLES,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                start,
  output logic                bist_en,
  output logic                we,
  output logic [AW-1:0]       waddr,
  output logic [SAMPLE_W:0]   wdata,
  output logic [AW-1:0]       raddr,
  input  logic [SAMPLE_W:0]   rdata [4],
  output logic [7:0]          code
);

  typedef enum logic [1:0] {B_IDLE, B_WRITE, B_READ, B_LAST} bstate_e;
  bstate_e       st;
  logic          pass;          // 0: pattern 55h, 1: pattern AAh
  logic [AW-1:0] addr;
  logic          chk;           // compare rdata this cycle
  logic [AW-1:0] chk_addr;
  logic          bad;

  function automatic logic [SAMPLE_W:0] expect_word(input logic p, input logic [AW-1:0] ad);
    logic [7:0] v;
    v = (p ? 8'hAA : 8'h55) ^ 8'(ad);
    return {^v, v};
  endfunction

  assign bist_en = (st != B_IDLE);
  assign we      = (st == B_WRITE);
  assign waddr   = addr;
  assign wdata   = expect_word(pass, addr);
  assign raddr   = addr;

  logic mismatch;
  always_comb begin
    mismatch = 1'b0;
    for (int i = 0; i < 4; i++)
      if (rdata[i] != expect_word(pass, chk_addr)) mismatch = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st       <= B_IDLE;
      pass     <= 1'b0;
      addr     <= '0;
      chk      <= 1'b0;
      chk_addr <= '0;
      bad      <= 1'b0;
      code     <= BIST_NONE;
    end else begin
      chk      <= (st == B_READ);
      chk_addr <= addr;
      if (chk && mismatch) bad <= 1'b1;
      unique case (st)
        B_IDLE: if (start) begin
          st   <= B_WRITE;
          pass <= 1'b0;
          addr <= '0;
          bad  <= 1'b0;
          code <= BIST_BUSY;
        end
        B_WRITE: begin
          addr <= addr + AW'(1);
          if (addr == AW'(DEPTH - 1)) st <= B_READ;
        end
        B_READ: begin
          addr <= addr + AW'(1);
          if (addr == AW'(DEPTH - 1)) st <= B_LAST;
        end
        B_LAST: begin
          // the last read is compared in this cycle
          if (!pass) begin
            pass <= 1'b1;
            st   <= B_WRITE;
          end else begin
            st   <= B_IDLE;
            code <= (bad || (chk && mismatch)) ? BIST_FAIL : BIST_PASS;
          end
        end
        default: st <= B_IDLE;
      endcase
    end
  end

endmodule
