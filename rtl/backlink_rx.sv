// backlink_rx: receiver of the serial back-link that remotely controls the chip.
//
// The back-link carries one bit per master-clock cycle, synchronous to clk,
// in 8-bit code words sent MSB first. A synchronization state machine finds
// the word boundary and watches the link quality:
//   ACQ   : hunt bit by bit for the IDLE pattern. The first IDLE fixes the word
//           boundary; three more consecutive IDLE words enter SYNC. Any other
//           word on the fixed boundary drops the boundary and restarts the hunt.
//   SYNC  : every valid code is decoded as an instruction; one invalid code
//           enters CHECK.
//   CHECK : four consecutive valid codes return to SYNC; three invalid codes,
//           not necessarily consecutive, declare the link lost and return to
//           ACQ. Instructions are not executed in CHECK.
// The state machine and its counts follow the published link description. The
// code words, the word length and the instruction set (RUN mode, JTAG mode,
// reset) are this design's own choice; the chip is in JTAG mode after reset.
// A RESET instruction pulses soft_rst for one cycle, puts the chip back in
// JTAG mode and restarts the state machine in ACQ, as a power-up would.
//
// Timing: a word is decoded in the cycle its last bit is sampled; state, mode
// and soft_rst change on the following clock edge.
module backlink_rx
  import carlos_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,      // power-up reset
  input  logic        bl_in,      // serial back-link bit
  output link_state_e state,
  output logic        run_mode,   // 1: RUN mode, 0: JTAG mode
  output logic        soft_rst    // one-cycle reset of the chip logic
);

  logic [BL_W-2:0] sr;                       // last seven bits
  logic [BL_W-1:0] sr_next;                  // with the bit of this cycle
  logic            locked;                   // word boundary known
  logic [2:0]      bitcnt;                   // bits received in current word
  logic [1:0]      idle_cnt;                 // IDLE words seen in ACQ (after the first)
  logic [1:0]      val_cnt;                  // consecutive valid codes in CHECK
  logic [1:0]      inv_cnt;                  // invalid codes in CHECK
  logic            word_done;
  logic            valid;

  assign sr_next   = {sr, bl_in};
  assign word_done = locked && (bitcnt == 3'(BL_W - 1));
  assign valid     = bl_valid_code(sr_next);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sr       <= '0;
      locked   <= 1'b0;
      bitcnt   <= '0;
      idle_cnt <= '0;
      val_cnt  <= '0;
      inv_cnt  <= '0;
      state    <= LINK_ACQ;
      run_mode <= 1'b0;
      soft_rst <= 1'b0;
    end else begin
      sr       <= sr_next[BL_W-2:0];
      soft_rst <= 1'b0;
      if (locked) bitcnt <= bitcnt + 3'd1;

      if (!locked) begin
        // hunting for the first IDLE at any bit position
        if (sr_next == BL_IDLE) begin
          locked   <= 1'b1;
          bitcnt   <= '0;
          idle_cnt <= '0;
        end
      end else if (word_done) begin
        unique case (state)
          LINK_ACQ: begin
            if (sr_next == BL_IDLE) begin
              idle_cnt <= idle_cnt + 2'd1;
              if (idle_cnt == 2'd2) state <= LINK_SYNC;
            end else begin
              locked   <= 1'b0;
              idle_cnt <= '0;
            end
          end
          LINK_SYNC: begin
            if (!valid) begin
              state   <= LINK_CHECK;
              val_cnt <= '0;
              inv_cnt <= '0;
            end else begin
              unique case (sr_next)
                BL_RUN:   run_mode <= 1'b1;
                BL_JTAG:  run_mode <= 1'b0;
                BL_RESET: begin
                  soft_rst <= 1'b1;
                  run_mode <= 1'b0;
                  state    <= LINK_ACQ;
                  locked   <= 1'b0;
                  idle_cnt <= '0;
                end
                default: ;
              endcase
            end
          end
          LINK_CHECK: begin
            if (valid) begin
              val_cnt <= val_cnt + 2'd1;
              if (val_cnt == 2'd3) state <= LINK_SYNC;
            end else begin
              val_cnt <= '0;
              inv_cnt <= inv_cnt + 2'd1;
              if (inv_cnt == 2'd2) begin
                state    <= LINK_ACQ;
                locked   <= 1'b0;
                idle_cnt <= '0;
              end
            end
          end
          default: state <= LINK_ACQ;
        endcase
      end
    end
  end

endmodule
