// compressor_2d: two-threshold two-dimensional zero suppression of one input
// channel (one half detector).
//
// An event is ANODES anodes, each a run of samples_m1+1 consecutive 8-bit time
// samples, arriving anode after anode at up to one sample per clock (in_valid).
// A sample survives when it is at or above the high threshold, or when it is
// at or above the low threshold and one of its four neighbours (previous and
// next time sample on the same anode, same time sample on the previous and next
// anode) is at or above the high threshold. Every other sample is replaced by
// zero. Small isolated noise is thus cut while the tails of real clusters are
// kept. The two thresholds and their use to cut under-threshold data follow
// the chip description; the exact neighbourhood rule is the common two-
// threshold 2D scheme and is this design's reading of it.
//
// Row buffers: two dual-port 256x9 RAMs hold the two previous anodes, each
// word an 8-bit sample plus an even-parity bit. Row r lives in RAM r%2, so
// while anode a arrives, RAM (a-1)%2 supplies anode a-1 (the row being decided)
// and RAM a%2 supplies anode a-2 before it is overwritten by anode a. Both
// RAMs share one read address, presented one cycle ahead. Parity is checked on
// every RAM word that is used; a mismatch pulses parity_err.
//
// The decision for sample (a-1, t-1) is made when sample (a, t) arrives; the
// last sample of each anode is decided when the next anode starts. After the
// last anode the channel runs a flush pass of samples_m1+2 cycles with zero
// input (busy high); input arriving then is dropped and pulses lost.
//
// Outputs, registered (one cycle after the deciding step): dec_valid with the
// position (dec_anode, dec_time), dec_keep and the surviving value (0 when
// cut), in anode-major order; ev_start when the first sample of an event is
// taken; ev_end one cycle after the last decision. samples_m1 must be at
// least 1 and at most SAMPLES-1 and must not change during an event.
//
// BIST port: with bist_en high the RAM ports belong to the BIST controller,
// which writes both RAMs with the same data and reads both at bist_raddr.
module compressor_2d
  import carlos_pkg::*;
#(
  parameter int unsigned ANODES  = N_ANODES,
  parameter int unsigned SAMPLES = N_SAMPLES,
  localparam int unsigned TW     = $clog2(SAMPLES),
  localparam int unsigned AW     = $clog2(ANODES + 2)
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                enable,        // RUN mode
  input  logic                in_valid,
  input  logic [SAMPLE_W-1:0] in_data,
  input  logic [SAMPLE_W-1:0] thr_low,
  input  logic [SAMPLE_W-1:0] thr_high,
  input  logic [TW-1:0]       samples_m1,
  output logic                dec_valid,
  output logic [7:0]          dec_anode,
  output logic [7:0]          dec_time,
  output logic                dec_keep,
  output logic [SAMPLE_W-1:0] dec_value,
  output logic                ev_start,
  output logic                ev_end,
  output logic                busy,
  output logic                lost,
  output logic                parity_err,
  // BIST access to the two row RAMs
  input  logic                bist_en,
  input  logic                bist_we,
  input  logic [TW-1:0]       bist_waddr,
  input  logic [SAMPLE_W:0]   bist_wdata,
  input  logic [TW-1:0]       bist_raddr,
  output logic [SAMPLE_W:0]   bist_rdata [2]
);

  // ---------------- step control ----------------
  logic          active;
  logic [AW-1:0] a;          // anode being received (ANODES = zero flush row)
  logic [TW-1:0] t;          // time sample being received
  logic          step;
  logic          flushing;
  logic [AW-1:0] a_nx;
  logic [TW-1:0] t_nx;
  logic          last_step;

  assign flushing  = active && (a >= AW'(ANODES));
  assign busy      = flushing;
  assign step      = flushing || (enable && in_valid);
  assign last_step = active && (a == AW'(ANODES + 1));

  always_comb begin
    a_nx = a;
    t_nx = t;
    if (step) begin
      if (last_step) begin
        a_nx = '0;
        t_nx = '0;
      end else if (t == samples_m1) begin
        a_nx = a + AW'(1);
        t_nx = '0;
      end else begin
        t_nx = t + TW'(1);
      end
    end
  end

  // ---------------- row RAMs ----------------
  logic            ram_we  [2];
  logic [TW-1:0]   ram_wa;
  logic [SAMPLE_W:0] ram_wd;
  logic [TW-1:0]   ram_ra;
  logic [SAMPLE_W:0] ram_rd [2];
  logic            wr_row;

  assign wr_row = step && (a < AW'(ANODES));

  always_comb begin
    if (bist_en) begin
      ram_we[0] = bist_we;
      ram_we[1] = bist_we;
      ram_wa    = bist_waddr;
      ram_wd    = bist_wdata;
      ram_ra    = bist_raddr;
    end else begin
      ram_we[0] = wr_row && !a[0];
      ram_we[1] = wr_row &&  a[0];
      ram_wa    = t;
      ram_wd    = {^in_data, in_data};
      ram_ra    = t_nx;
    end
  end

  for (genvar i = 0; i < 2; i++) begin : g_ram
    dpram_256x9 #(.DEPTH(SAMPLES), .WIDTH(SAMPLE_W + 1)) u_ram (
      .clk   (clk),
      .we    (ram_we[i]),
      .waddr (ram_wa),
      .wdata (ram_wd),
      .re    (1'b1),
      .raddr (ram_ra),
      .rdata (ram_rd[i])
    );
  end
  assign bist_rdata = ram_rd;

  // ---------------- neighbourhood ----------------
  logic              x_use, y_use;
  logic [SAMPLE_W:0] x_raw, y_raw;
  logic [SAMPLE_W-1:0] xv, yv, iv;
  logic [SAMPLE_W-1:0] xm1, xm2, ym1, im1;   // center, previous time, prev anode, next anode
  logic [SAMPLE_W-1:0] nt;
  logic              decide;
  logic              keep;

  assign x_raw = a[0] ? ram_rd[0] : ram_rd[1];   // anode a-1
  assign y_raw = a[0] ? ram_rd[1] : ram_rd[0];   // anode a-2
  assign x_use = (a >= AW'(1)) && (a <= AW'(ANODES));
  assign y_use = (a >= AW'(2)) && (a <= AW'(ANODES));
  assign xv    = x_use ? x_raw[SAMPLE_W-1:0] : '0;
  assign yv    = y_use ? y_raw[SAMPLE_W-1:0] : '0;
  assign iv    = (a < AW'(ANODES)) ? in_data : '0;
  assign nt    = (t == '0) ? '0 : xv;

  // a center exists for (a-1, t-1) when t > 0, or for (a-2, last) when t == 0
  assign decide = step && active &&
                  (((t != '0) && (a >= AW'(1)) && (a <= AW'(ANODES))) ||
                   ((t == '0) && (a >= AW'(2))));

  function automatic logic ge(input logic [SAMPLE_W-1:0] v, input logic [SAMPLE_W-1:0] th);
    return v >= th;
  endfunction

  assign keep = ge(xm1, thr_high) ||
                (ge(xm1, thr_low) &&
                 (ge(xm2, thr_high) || ge(nt, thr_high) ||
                  ge(ym1, thr_high) || ge(im1, thr_high)));

  logic par_bad;
  logic ev_end_d;
  assign par_bad = step && active &&
                   ((x_use && (^x_raw)) || (y_use && (^y_raw)));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      active     <= 1'b0;
      a          <= '0;
      t          <= '0;
      xm1        <= '0;
      xm2        <= '0;
      ym1        <= '0;
      im1        <= '0;
      dec_valid  <= 1'b0;
      dec_anode  <= '0;
      dec_time   <= '0;
      dec_keep   <= 1'b0;
      dec_value  <= '0;
      ev_start   <= 1'b0;
      ev_end     <= 1'b0;
      ev_end_d   <= 1'b0;
      lost       <= 1'b0;
      parity_err <= 1'b0;
    end else begin
      a          <= a_nx;
      t          <= t_nx;
      ev_start   <= step && !active;
      ev_end_d   <= step && last_step;
      ev_end     <= ev_end_d;
      lost       <= flushing && in_valid;
      parity_err <= par_bad;
      if (step) begin
        active <= !last_step;
        xm1    <= xv;
        xm2    <= (t == '0) ? '0 : xm1;
        ym1    <= yv;
        im1    <= iv;
      end
      dec_valid <= decide;
      if (decide) begin
        dec_anode <= 8'((t == '0) ? (a - AW'(2)) : (a - AW'(1)));
        dec_time  <= 8'((t == '0) ? samples_m1 : (t - TW'(1)));
        dec_keep  <= keep;
        dec_value <= keep ? xm1 : '0;
      end
    end
  end

endmodule
