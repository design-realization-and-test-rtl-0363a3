// rx_concentrator: the data path of the receiver card. It collects the
// 16-bit output words of two CARLOSv3 cards (after the optical link) and
// forwards them as 32-bit words towards the DAQ system.
//
// Words of each card are paired: two consecutive 15-bit words of one card
// form one 32-bit word
//   [31]    card number
//   [30]    1 when both halves are valid, 0 when only [29:15] is
//   [29:15] first word, [14:0] second word.
// A trailer word (end of a channel's event) closes its pair at once, so an
// event never waits in the pairing register. Each card has a small FIFO of
// 32-bit words; the two FIFOs are served alternately, one word per clock.
// A FIFO overflow is flagged on overflow. The receiver card is described only
// by what it does (it concentrates several chips and feeds a 32-bit DAQ
// link); this pairing format and the buffering are this design's own.
// Output timing: out_valid one cycle after a word is popped from a FIFO.
module rx_concentrator
  import carlos_pkg::*;
#(
  parameter int unsigned FIFO_DEPTH = 16
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [WORD_W-1:0] link_data [2],
  input  logic              link_en   [2],
  output logic [31:0]       out_data,
  output logic              out_valid,
  output logic              overflow
);

  localparam int unsigned PW = 2 * WORD_W + 1;   // {both, first, second}

  logic [PW-1:0] f_data  [2];
  logic          f_empty [2];
  logic          f_rd    [2];
  logic          f_ovf   [2];

  for (genvar k = 0; k < 2; k++) begin : g_card
    logic              held;
    logic [WORD_W-1:0] first;
    logic [1:0]        wr_cnt;
    logic [PW-1:0]     wr_data [3];
    logic              is_trailer;

    assign is_trailer = link_data[k][13] &&
                        (link_data[k][12:11] == 2'(CW_TRAILER));

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        held    <= 1'b0;
        first   <= '0;
        wr_cnt  <= '0;
        wr_data <= '{default: '0};
      end else begin
        wr_cnt <= '0;
        if (link_en[k]) begin
          if (held) begin
            wr_cnt     <= 2'd1;
            wr_data[0] <= {1'b1, first, link_data[k]};
            held       <= 1'b0;
          end else if (is_trailer) begin
            wr_cnt     <= 2'd1;
            wr_data[0] <= {1'b0, link_data[k], {WORD_W{1'b0}}};
          end else begin
            held  <= 1'b1;
            first <= link_data[k];
          end
        end
      end
    end

    multi_write_fifo #(.WIDTH(PW), .DEPTH(FIFO_DEPTH)) u_fifo (
      .clk      (clk),
      .rst_n    (rst_n),
      .wr_cnt   (wr_cnt),
      .wr_prio  (1'b0),
      .wr_data  (wr_data),
      .rd       (f_rd[k]),
      .rd_data  (f_data[k]),
      .empty    (f_empty[k]),
      .overflow (f_ovf[k])
    );
  end

  logic last, pick, any;
  always_comb begin
    any = !f_empty[0] || !f_empty[1];
    if (!f_empty[0] && !f_empty[1]) pick = !last;
    else                            pick = f_empty[0];
    f_rd[0] = any && !pick;
    f_rd[1] = any &&  pick;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      last      <= 1'b1;
      out_valid <= 1'b0;
      out_data  <= '0;
      overflow  <= 1'b0;
    end else begin
      out_valid <= any;
      overflow  <= f_ovf[0] || f_ovf[1];
      if (any) begin
        out_data <= {pick, f_data[pick]};
        last     <= pick;
      end
    end
  end

endmodule
