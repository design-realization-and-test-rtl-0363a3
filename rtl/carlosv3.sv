// carlosv3: the data compressor and packer chip of the silicon drift detector
// readout.
//
// Two 8-bit input channels, one per half detector, each feed a two-threshold
// 2D compressor (compressor_2d) with its two 256x9 row RAMs, an event encoder
// and an output FIFO. The two FIFOs share the 16-bit output word to the
// serializer (15 data bits plus an enable bit), one word per 40 MHz clock.
// The chip is controlled remotely: the serial back-link (backlink_rx) selects
// RUN or JTAG mode and can reset the chip logic; in JTAG mode the JTAG unit
// sets the thresholds and the number of samples per anode, starts the BIST,
// and the JTAG switch extends the JTAG chain to the two hybrids and the
// serializer. Configuration bytes carry parity, the row RAM words carry
// parity, and any error seen during an event is reported in its trailer word
// and on the err output.
//
// Events are started by the external trigger: a trigger pulse in RUN mode
// opens, on each channel that has none open, a window of exactly one event
// (ANODES x programmed samples per anode); samples outside a window are
// ignored, and a trigger while a channel's window is open changes nothing on
// that channel. Samples that arrive while the channel is still flushing the
// previous event are passed on (and dropped there as lost) but do not use up
// the window. The trigger must come at least one clock before the first
// sample. That the chip is synchronized to an external trigger follows the
// chip description; the window mechanism is this design's own.
//
// The two modes exclude each other: input samples are taken only in RUN
// mode, the TAP runs only in JTAG mode. The back-link's soft reset, registered
// once, resets everything except the back-link receiver. The partitioning into
// these blocks follows the chip description; the word formats, codes and FIFO
// depth are this design's own (see the blocks).
module carlosv3
  import carlos_pkg::*;
#(
  parameter int unsigned ANODES     = N_ANODES,
  parameter int unsigned SAMPLES    = N_SAMPLES,
  parameter int unsigned FIFO_DEPTH = 64
) (
  input  logic                clk,          // 40 MHz master clock
  input  logic                rst_n,        // power-up reset
  // serial back-link from the receiver card
  input  logic                bl_in,
  // trigger and hybrid inputs
  input  logic                trigger,       // opens one event window per channel
  input  logic [SAMPLE_W-1:0] ch_data  [2],
  input  logic                ch_valid [2],
  output logic                busy,          // flushing the end of an event
  // 16-bit output word to the serializer
  output logic [WORD_W-1:0]   out_data,
  output logic                out_en,
  // JTAG port and the three downstream JTAG ports
  input  logic                tck,
  input  logic                tms,
  input  logic                tdi,
  output logic                tdo,
  output logic [2:0]          port_tck,
  output logic [2:0]          port_tms,
  output logic [2:0]          port_tdi,
  input  logic [2:0]          port_tdo,
  // status
  output link_state_e         link_state,
  output logic                run_mode,
  output logic                err
);

  localparam int unsigned TW = $clog2(SAMPLES);
  localparam int unsigned EW = $clog2(ANODES * SAMPLES + 1);

  // ---------------- back-link and reset ----------------
  logic soft_rst, core_rst_n;

  backlink_rx u_backlink (
    .clk      (clk),
    .rst_n    (rst_n),
    .bl_in    (bl_in),
    .state    (link_state),
    .run_mode (run_mode),
    .soft_rst (soft_rst)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) core_rst_n <= 1'b0;
    else        core_rst_n <= !soft_rst;
  end

  // ---------------- JTAG ----------------
  cfg_t       cfg;
  logic       cfg_perr;
  logic [1:0] sw_sel;
  logic       bist_start;
  logic [7:0] bist_code;
  logic       own_tdo;

  jtag_unit #(.SAMPLES(SAMPLES)) u_jtag (
    .clk            (clk),
    .rst_n          (core_rst_n),
    .enable         (!run_mode),
    .tck            (tck),
    .tms            (tms),
    .tdi            (tdi),
    .tdo            (own_tdo),
    .cfg            (cfg),
    .cfg_parity_err (cfg_perr),
    .sw_sel         (sw_sel),
    .bist_start     (bist_start),
    .bist_code      (bist_code)
  );

  jtag_switch u_switch (
    .enable   (!run_mode),
    .sel      (sw_sel),
    .tck      (tck),
    .tms      (tms),
    .own_tdo  (own_tdo),
    .tdo      (tdo),
    .port_tck (port_tck),
    .port_tms (port_tms),
    .port_tdi (port_tdi),
    .port_tdo (port_tdo)
  );

  // ---------------- BIST ----------------
  logic              bist_en, bist_we;
  logic [TW-1:0]     bist_waddr, bist_raddr;
  logic [SAMPLE_W:0] bist_wdata;
  logic [SAMPLE_W:0] bist_rdata [4];
  logic [SAMPLE_W:0] ch_bist_rdata [2][2];

  bist_ctrl #(.DEPTH(SAMPLES)) u_bist (
    .clk     (clk),
    .rst_n   (core_rst_n),
    .start   (bist_start && !run_mode),
    .bist_en (bist_en),
    .we      (bist_we),
    .waddr   (bist_waddr),
    .wdata   (bist_wdata),
    .raddr   (bist_raddr),
    .rdata   (bist_rdata),
    .code    (bist_code)
  );

  assign bist_rdata[0] = ch_bist_rdata[0][0];
  assign bist_rdata[1] = ch_bist_rdata[0][1];
  assign bist_rdata[2] = ch_bist_rdata[1][0];
  assign bist_rdata[3] = ch_bist_rdata[1][1];

  // ---------------- channels ----------------
  logic [SAMPLE_W-1:0] thr_low  [2];
  logic [SAMPLE_W-1:0] thr_high [2];
  assign thr_low[0]  = cfg.thr_low0.val;
  assign thr_high[0] = cfg.thr_high0.val;
  assign thr_low[1]  = cfg.thr_low1.val;
  assign thr_high[1] = cfg.thr_high1.val;

  logic [WORD_W-1:0] fifo_data  [2];
  logic              fifo_empty [2];
  logic              fifo_rd    [2];
  logic              ch_busy    [2];
  logic              ch_err     [2];

  for (genvar c = 0; c < 2; c++) begin : g_ch
    logic                dec_valid, dec_keep, ev_start, ev_end, lost, perr, ovf;
    logic [7:0]          dec_anode, dec_time;
    logic [SAMPLE_W-1:0] dec_value;
    logic [1:0]          wr_cnt;
    logic                wr_prio;
    logic [WORD_W-1:0]   wr_word [3];

    // event window: samples left to take for the triggered event
    logic [EW-1:0]       win_left;
    logic                take;
    assign take = run_mode && ch_valid[c] && (win_left != '0);

    always_ff @(posedge clk or negedge core_rst_n) begin
      if (!core_rst_n) win_left <= '0;
      else if (run_mode && trigger && (win_left == '0))
        win_left <= EW'(ANODES) * (EW'(cfg.samples_m1.val) + EW'(1));
      else if (take && !ch_busy[c])        // samples dropped in a flush do not count
        win_left <= win_left - EW'(1);
    end

    compressor_2d #(.ANODES(ANODES), .SAMPLES(SAMPLES)) u_comp (
      .clk        (clk),
      .rst_n      (core_rst_n),
      .enable     (run_mode),
      .in_valid   (take),
      .in_data    (ch_data[c]),
      .thr_low    (thr_low[c]),
      .thr_high   (thr_high[c]),
      .samples_m1 (TW'(cfg.samples_m1.val)),
      .dec_valid  (dec_valid),
      .dec_anode  (dec_anode),
      .dec_time   (dec_time),
      .dec_keep   (dec_keep),
      .dec_value  (dec_value),
      .ev_start   (ev_start),
      .ev_end     (ev_end),
      .busy       (ch_busy[c]),
      .lost       (lost),
      .parity_err (perr),
      .bist_en    (bist_en),
      .bist_we    (bist_we),
      .bist_waddr (bist_waddr),
      .bist_wdata (bist_wdata),
      .bist_raddr (bist_raddr),
      .bist_rdata (ch_bist_rdata[c])
    );

    event_encoder #(.CH(1'(c))) u_enc (
      .clk            (clk),
      .rst_n          (core_rst_n),
      .ev_start       (ev_start),
      .ev_end         (ev_end),
      .dec_valid      (dec_valid),
      .dec_anode      (dec_anode),
      .dec_time       (dec_time),
      .dec_keep       (dec_keep),
      .dec_value      (dec_value),
      .err_ram_parity (perr),
      .err_cfg_parity (cfg_perr && run_mode),
      .err_overflow   (ovf),
      .err_lost       (lost),
      .wr_cnt         (wr_cnt),
      .wr_prio        (wr_prio),
      .wr_word        (wr_word)
    );

    multi_write_fifo #(.WIDTH(WORD_W), .DEPTH(FIFO_DEPTH), .RESERVE(2)) u_fifo (
      .clk      (clk),
      .rst_n    (core_rst_n),
      .wr_cnt   (wr_cnt),
      .wr_prio  (wr_prio),
      .wr_data  (wr_word),
      .rd       (fifo_rd[c]),
      .rd_data  (fifo_data[c]),
      .empty    (fifo_empty[c]),
      .overflow (ovf)
    );

    assign ch_err[c] = perr || ovf || lost;
  end

  output_mux u_mux (
    .clk        (clk),
    .rst_n      (core_rst_n),
    .fifo_data  (fifo_data),
    .fifo_empty (fifo_empty),
    .fifo_rd    (fifo_rd),
    .out_data   (out_data),
    .out_en     (out_en)
  );

  assign busy = ch_busy[0] || ch_busy[1];

  // sticky error flag, cleared by a reset
  always_ff @(posedge clk or negedge core_rst_n) begin
    if (!core_rst_n) err <= 1'b0;
    else if (ch_err[0] || ch_err[1] || cfg_perr) err <= 1'b1;
  end

endmodule
