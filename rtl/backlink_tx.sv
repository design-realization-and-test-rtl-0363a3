// backlink_tx: transmitter of the serial back-link, the receiver card's side.
//
// Sends 8-bit code words MSB first, one bit per clock, back to back. When no
// word is queued it sends IDLE, so an idle link keeps the chip's
// synchronization state machine locked. One word can be queued: word_req
// with word_ready high loads it, and it is sent as the next whole word after
// the word in flight. Any 8-bit value may be queued, including codes the chip
// treats as invalid, which lets the receiver card exercise the chip's link
// check. The receiver card's logic is only described by its function; this
// word-level interface is this design's own.
//
// Timing: a word loaded in cycle n starts at most 8 cycles later and
// occupies bl_out for 8 consecutive cycles.
module backlink_tx
  import carlos_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  input  logic            word_req,
  input  logic [BL_W-1:0] word_in,
  output logic            word_ready,
  output logic            bl_out
);

  logic [BL_W-1:0] sh;        // word being sent, MSB out first
  logic [2:0]      bitcnt;
  logic            q_full;
  logic [BL_W-1:0] q_word;

  assign word_ready = !q_full;
  assign bl_out     = sh[BL_W-1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sh     <= BL_IDLE;
      bitcnt <= '0;
      q_full <= 1'b0;
      q_word <= '0;
    end else begin
      if (word_req && !q_full) begin
        q_full <= 1'b1;
        q_word <= word_in;
      end
      if (bitcnt == 3'(BL_W - 1)) begin
        bitcnt <= '0;
        if (q_full) begin
          sh     <= q_word;
          q_full <= 1'b0;
        end else begin
          sh <= BL_IDLE;
        end
      end else begin
        bitcnt <= bitcnt + 3'd1;
        sh     <= {sh[BL_W-2:0], 1'b0};
      end
    end
  end

endmodule
