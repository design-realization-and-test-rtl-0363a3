// daq_chain: the readout chain of one silicon drift detector: two CARLOSv3
// cards, one per detector pair of halves, and the logic of the receiver card
// that concentrates them and controls them.
//
// Each CARLOSv3 takes two 8-bit sample streams from its hybrids (or a
// pattern generator), compresses and packs them and sends a 16-bit word per
// clock towards its serializer. The serializer and the 800 Mbit/s optical
// link are outside this RTL: each card's 16-bit word leaves on card_out_*
// and the receiver side takes the words back in on link_in_*; a link that
// delivers words unchanged is a wire between the two. The receiver card
// drives one serial back-link per card (backlink_tx) to set RUN or JTAG mode
// and reset the chips, and merges both cards' words into the 32-bit DAQ
// stream (rx_concentrator). The JTAG ports of the cards and their downstream
// JTAG ports are brought out. The arrangement (two chip cards, one receiver
// card, back-links, 32-bit output) follows the readout sketch; everything is
// clocked by the common 40 MHz master clock.
module daq_chain
  import carlos_pkg::*;
#(
  parameter int unsigned ANODES     = N_ANODES,
  parameter int unsigned SAMPLES    = N_SAMPLES,
  parameter int unsigned FIFO_DEPTH = 64
) (
  input  logic                clk,
  input  logic                rst_n,
  // trigger per card, hybrid inputs [card][channel]
  input  logic                trigger  [2],
  input  logic [SAMPLE_W-1:0] ch_data  [2][2],
  input  logic                ch_valid [2][2],
  output logic                busy     [2],
  // 16-bit words towards each card's serializer
  output logic [WORD_W-1:0]   card_out_data [2],
  output logic                card_out_en   [2],
  // 16-bit words from each optical link, at the receiver card
  input  logic [WORD_W-1:0]   link_in_data  [2],
  input  logic                link_in_en    [2],
  // back-link word requests of the receiver card, per card
  input  logic                bl_req   [2],
  input  logic [BL_W-1:0]     bl_word  [2],
  output logic                bl_ready [2],
  // JTAG of each card and its downstream ports
  input  logic                tck [2],
  input  logic                tms [2],
  input  logic                tdi [2],
  output logic                tdo [2],
  output logic [2:0]          port_tck [2],
  output logic [2:0]          port_tms [2],
  output logic [2:0]          port_tdi [2],
  input  logic [2:0]          port_tdo [2],
  // status of each card
  output link_state_e         link_state [2],
  output logic                run_mode   [2],
  output logic                err        [2],
  // 32-bit stream towards the DAQ
  output logic [31:0]         daq_data,
  output logic                daq_valid,
  output logic                daq_overflow
);

  for (genvar k = 0; k < 2; k++) begin : g_card
    logic bl;

    backlink_tx u_bltx (
      .clk        (clk),
      .rst_n      (rst_n),
      .word_req   (bl_req[k]),
      .word_in    (bl_word[k]),
      .word_ready (bl_ready[k]),
      .bl_out     (bl)
    );

    carlosv3 #(.ANODES(ANODES), .SAMPLES(SAMPLES), .FIFO_DEPTH(FIFO_DEPTH)) u_chip (
      .clk        (clk),
      .rst_n      (rst_n),
      .bl_in      (bl),
      .trigger    (trigger[k]),
      .ch_data    (ch_data[k]),
      .ch_valid   (ch_valid[k]),
      .busy       (busy[k]),
      .out_data   (card_out_data[k]),
      .out_en     (card_out_en[k]),
      .tck        (tck[k]),
      .tms        (tms[k]),
      .tdi        (tdi[k]),
      .tdo        (tdo[k]),
      .port_tck   (port_tck[k]),
      .port_tms   (port_tms[k]),
      .port_tdi   (port_tdi[k]),
      .port_tdo   (port_tdo[k]),
      .link_state (link_state[k]),
      .run_mode   (run_mode[k]),
      .err        (err[k])
    );
  end

  rx_concentrator u_rx (
    .clk       (clk),
    .rst_n     (rst_n),
    .link_data (link_in_data),
    .link_en   (link_in_en),
    .out_data  (daq_data),
    .out_valid (daq_valid),
    .overflow  (daq_overflow)
  );

endmodule
