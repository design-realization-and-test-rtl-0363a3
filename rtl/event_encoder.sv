// event_encoder: packs the decisions of one compressor channel into 15-bit
// output words (the data part of the chip's 16-bit output word).
//
// Only surviving samples are sent. Words (layout in carlos_pkg):
//   EVENT   at the start of an event, carrying an 11-bit event number;
//   ANODE   before the first surviving sample of an anode (time pointer := 0);
//   JUMP    when a surviving sample lies more than 31 samples after the time
//           pointer, carrying the sample's absolute time;
//   DATA    the sample value and the number of zeros skipped since the time
//           pointer (0..31); the pointer then moves past the sample;
//   TRAILER at the end of an event, with the error flags seen during it.
// A reader rebuilds the event by starting from all zeros and replaying the
// words. The chip description only says that the output is a 15-bit data word
// plus an enable bit and that the chip packs the compressed data; this word
// format is this design's own.
//
// One decision can produce up to three words (ANODE, JUMP, DATA), so the
// encoder writes 0..3 words per cycle into the channel FIFO (wr_cnt, wr_word
// with word 0 first). Output is registered: words appear one cycle after the
// decision. Error pulses (err_*) are collected into the trailer flags and
// cleared when the trailer is written. EVENT and TRAILER words are marked
// wr_prio so that the FIFO keeps room for them; when the FIFO drops ordinary
// words (err_overflow, high in the cycle of the drop) the next surviving sample is preceded by ANODE and JUMP
// words again, so a reader loses only the dropped samples.
module event_encoder
  import carlos_pkg::*;
#(
  parameter bit CH = 1'b0     // channel number written into every word
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                ev_start,
  input  logic                ev_end,
  input  logic                dec_valid,
  input  logic [7:0]          dec_anode,
  input  logic [7:0]          dec_time,
  input  logic                dec_keep,
  input  logic [SAMPLE_W-1:0] dec_value,
  input  logic                err_ram_parity,
  input  logic                err_cfg_parity,
  input  logic                err_overflow,
  input  logic                err_lost,
  output logic [1:0]          wr_cnt,
  output logic                wr_prio,     // EVENT or TRAILER word
  output logic [WORD_W-1:0]   wr_word [3]
);

  logic        hdr_sent;       // an ANODE word was sent for cur_anode
  logic [7:0]  cur_anode;
  logic [8:0]  tptr;           // time pointer of the current anode
  logic [10:0] ev_num;
  logic [FLAGS_W-1:0] flags;

  logic [FLAGS_W-1:0] flags_now;
  always_comb begin
    flags_now = flags;
    flags_now[FLAG_RAM_PARITY] |= err_ram_parity;
    flags_now[FLAG_CFG_PARITY] |= err_cfg_parity;
    flags_now[FLAG_OVERFLOW]   |= err_overflow;
    flags_now[FLAG_LOST]       |= err_lost;
  end

  // words for one surviving sample
  logic        need_hdr, need_jump;
  logic [8:0]  base;
  logic [8:0]  gap;
  logic [1:0]  s_cnt;                  // words for this sample, 1..3
  logic [WORD_W-1:0] s_word [3];
  always_comb begin
    // restate anode and time if the previous write is being dropped now
    need_hdr  = !(hdr_sent && (cur_anode == dec_anode)) || err_overflow;
    base      = need_hdr ? 9'd0 : tptr;
    gap       = {1'b0, dec_time} - base;
    need_jump = gap > 9'd31;
    s_word    = '{default: '0};
    s_cnt     = 2'd0;
    if (need_hdr) begin
      s_word[s_cnt] = ctrl_word(CH, CW_ANODE, {3'b000, dec_anode});
      s_cnt = s_cnt + 2'd1;
    end
    if (need_jump) begin
      s_word[s_cnt] = ctrl_word(CH, CW_JUMP, {3'b000, dec_time});
      s_cnt = s_cnt + 2'd1;
    end
    s_word[s_cnt] = data_word(CH, need_jump ? 5'd0 : gap[4:0], dec_value);
    s_cnt = s_cnt + 2'd1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hdr_sent  <= 1'b0;
      cur_anode <= '0;
      tptr      <= '0;
      ev_num    <= '0;
      flags     <= '0;
      wr_cnt    <= '0;
      wr_prio   <= 1'b0;
      wr_word   <= '{default: '0};
    end else begin
      wr_cnt  <= '0;
      wr_prio <= ev_start || ev_end;
      flags   <= flags_now;
      // words were dropped: restate anode and time with the next sample
      if (err_overflow) hdr_sent <= 1'b0;
      if (ev_start) begin
        wr_cnt     <= 2'd1;
        wr_word[0] <= ctrl_word(CH, CW_EVENT, ev_num);
        ev_num     <= ev_num + 11'd1;
        hdr_sent   <= 1'b0;
      end else if (ev_end) begin
        wr_cnt     <= 2'd1;
        wr_word[0] <= ctrl_word(CH, CW_TRAILER, flags_now);
        flags      <= '0;
      end else if (dec_valid && dec_keep) begin
        wr_word    <= s_word;
        wr_cnt     <= s_cnt;
        hdr_sent   <= 1'b1;
        cur_anode  <= dec_anode;
        tptr       <= {1'b0, dec_time} + 9'd1;
      end
    end
  end

endmodule
