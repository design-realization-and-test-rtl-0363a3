// multi_write_fifo: synchronous FIFO that accepts up to three words per cycle
// and delivers one per cycle, first-word-fall-through.
//
// Used as the output buffer of each compressor channel (the encoder can emit
// three words for one sample) and as the per-card buffer of the receiver
// concentrator. A write of wr_cnt words is taken whole or, when fewer than
// wr_cnt entries are free, dropped whole, and overflow is high in that same
// cycle (combinational); a read in the same cycle does not make room for that
// write. Ordinary writes must also leave RESERVE entries free; writes marked
// wr_prio may use them, so that a few essential words still get through when
// ordinary traffic fills the FIFO. rd_data is valid while empty is low; rd
// pops it. The depth is this design's choice: the chip description names
// FIFOs but gives no size.
module multi_write_fifo #(
  parameter int unsigned WIDTH = 15,
  parameter int unsigned DEPTH = 64,     // power of two
  parameter int unsigned RESERVE = 0,
  localparam int unsigned PW   = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [1:0]       wr_cnt,
  input  logic             wr_prio,
  input  logic [WIDTH-1:0] wr_data [3],
  input  logic             rd,
  output logic [WIDTH-1:0] rd_data,
  output logic             empty,
  output logic             overflow
);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [PW-1:0]    wp, rp;
  logic [PW:0]      count;
  logic             fits;
  logic             do_rd;

  assign empty   = (count == '0);
  assign rd_data = mem[rp];
  assign fits    = (32'(count) + 32'(wr_cnt)) <= (wr_prio ? DEPTH : DEPTH - RESERVE);
  assign do_rd   = rd && !empty;
  assign overflow = (wr_cnt != 2'd0) && !fits;

  always_ff @(posedge clk) begin
    if (fits) begin
      for (int i = 0; i < 3; i++) begin
        if (i < int'(wr_cnt)) mem[PW'(32'(wp) + i)] <= wr_data[i];
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp       <= '0;
      rp       <= '0;
      count    <= '0;
    end else begin
      if (fits) wp <= wp + PW'(wr_cnt);
      if (do_rd) rp <= rp + PW'(1);
      count <= count + (fits ? (PW+1)'(wr_cnt) : '0) - (do_rd ? (PW+1)'(1) : '0);
    end
  end

endmodule
