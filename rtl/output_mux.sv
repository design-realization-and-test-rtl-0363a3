// output_mux: merges the two channel FIFOs onto the chip's 16-bit output word
// towards the serializer: 15 data bits and one enable bit.
//
// Every clock at most one word leaves the chip. When both FIFOs hold data the
// channels alternate (round robin); when only one does, it is served every
// cycle. The output is registered: out_en is high in the cycle after the word
// was popped. Words already carry their channel number in bit 14. The 15+1
// split of the output word follows the chip description; the arbitration is
// this design's own.
module output_mux
  import carlos_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic [WORD_W-1:0] fifo_data [2],
  input  logic              fifo_empty [2],
  output logic              fifo_rd [2],
  output logic [WORD_W-1:0] out_data,
  output logic              out_en
);

  logic last;    // channel served last
  logic pick;
  logic any;

  always_comb begin
    any  = !fifo_empty[0] || !fifo_empty[1];
    if (!fifo_empty[0] && !fifo_empty[1]) pick = !last;
    else                                  pick = fifo_empty[0];
    fifo_rd[0] = any && !pick;
    fifo_rd[1] = any &&  pick;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      last     <= 1'b1;
      out_en   <= 1'b0;
      out_data <= '0;
    end else begin
      out_en <= any;
      if (any) begin
        out_data <= fifo_data[pick];
        last     <= pick;
      end else begin
        out_data <= '0;
      end
    end
  end

endmodule
