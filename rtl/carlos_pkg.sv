// carlos_pkg: types and constants shared by the CARLOSv3 data-compressor chip
// and the receiver-side logic of the readout chain.
//
// Contents:
//  * event geometry defaults: 256 anodes per half detector, up to 256 time
//    samples per anode, 8-bit samples (these follow the readout description);
//  * the 15-bit output word format written by the event encoder (the layout
//    is this design's own: the 16-bit chip output carries 15 data bits and an
//    enable bit, but the meaning of the 15 bits is not published);
//  * the 8-bit serial back-link code words (IDLE and commands, own choice);
//  * the JTAG instruction codes and BIST result codes (own choice);
//  * the configuration record held in the JTAG unit.
package carlos_pkg;

  // ---------------- geometry ----------------
  localparam int unsigned N_ANODES    = 256;  // anodes per half detector
  localparam int unsigned N_SAMPLES   = 256;  // time samples per anode (maximum)
  localparam int unsigned SAMPLE_W    = 8;    // bits per ADC sample
  localparam int unsigned WORD_W      = 15;   // data bits of the 16-bit output word
  localparam int unsigned RUN_W       = 5;    // zero-run field of a data word
  localparam int unsigned FLAGS_W     = 11;   // trailer flag field

  // ---------------- 15-bit output word ----------------
  //  [14]    channel number
  //  [13]    0 = data word, 1 = control word
  //  data    : [12:8] zeros skipped before this sample, [7:0] sample value
  //  control : [12:11] sub-type, [10:0] payload
  typedef enum logic [1:0] {
    CW_ANODE   = 2'b00,  // payload[7:0]  = anode number, time pointer := 0
    CW_JUMP    = 2'b01,  // payload[7:0]  = absolute time of the next sample
    CW_EVENT   = 2'b10,  // payload[10:0] = event number (start of event)
    CW_TRAILER = 2'b11   // payload[10:0] = error flags (end of event)
  } ctrl_kind_e;

  // trailer flag bits
  localparam int unsigned FLAG_RAM_PARITY = 0;
  localparam int unsigned FLAG_CFG_PARITY = 1;
  localparam int unsigned FLAG_OVERFLOW   = 2;
  localparam int unsigned FLAG_LOST       = 3;

  function automatic logic [WORD_W-1:0] data_word(input logic ch,
                                                   input logic [RUN_W-1:0] run,
                                                   input logic [SAMPLE_W-1:0] val);
    return {ch, 1'b0, run, val};
  endfunction

  function automatic logic [WORD_W-1:0] ctrl_word(input logic ch,
                                                   input ctrl_kind_e kind,
                                                   input logic [FLAGS_W-1:0] payload);
    return {ch, 1'b1, kind, payload};
  endfunction

  // ---------------- serial back-link ----------------
  localparam int unsigned BL_W = 8;            // bits per back-link code word
  localparam logic [BL_W-1:0] BL_IDLE  = 8'hBC;
  localparam logic [BL_W-1:0] BL_RUN   = 8'h53; // enter RUN mode
  localparam logic [BL_W-1:0] BL_JTAG  = 8'h35; // enter JTAG mode
  localparam logic [BL_W-1:0] BL_RESET = 8'hE1; // reset the chip logic

  function automatic logic bl_valid_code(input logic [BL_W-1:0] w);
    return (w == BL_IDLE) || (w == BL_RUN) || (w == BL_JTAG) || (w == BL_RESET);
  endfunction

  typedef enum logic [1:0] {
    LINK_ACQ   = 2'd0,
    LINK_SYNC  = 2'd1,
    LINK_CHECK = 2'd2
  } link_state_e;

  // ---------------- JTAG ----------------
  localparam int unsigned IR_W = 4;
  localparam logic [IR_W-1:0] IR_CONFIG = 4'h2;  // configuration register chain
  localparam logic [IR_W-1:0] IR_SWSEL  = 4'h3;  // JTAG switch port select
  localparam logic [IR_W-1:0] IR_BIST   = 4'h4;  // start BIST, read result code
  localparam logic [IR_W-1:0] IR_BYPASS = 4'hF;

  // BIST result codes shifted out on TDO
  localparam logic [7:0] BIST_NONE = 8'h00;
  localparam logic [7:0] BIST_BUSY = 8'h33;
  localparam logic [7:0] BIST_PASS = 8'hA5;
  localparam logic [7:0] BIST_FAIL = 8'hE7;

  // one parity-protected configuration byte: {even parity, value}
  typedef struct packed {
    logic                par;
    logic [SAMPLE_W-1:0] val;
  } pbyte_t;

  // configuration register chain, shifted LSB first
  typedef struct packed {
    pbyte_t samples_m1;  // time samples per anode minus one
    pbyte_t thr_high1;
    pbyte_t thr_low1;
    pbyte_t thr_high0;
    pbyte_t thr_low0;
  } cfg_t;

  localparam int unsigned CFG_W = $bits(cfg_t);

  function automatic pbyte_t mk_pbyte(input logic [SAMPLE_W-1:0] v);
    return '{par: ^v, val: v};
  endfunction

endpackage
