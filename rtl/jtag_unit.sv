// jtag_unit: the chip's JTAG unit. It holds the configuration that the
// compressor uses in RUN mode, the JTAG switch selection and the BIST
// control, all reached through an IEEE 1149.1 test access port.
//
// The TAP runs in the 40 MHz system clock domain: TCK, TMS and TDI are
// synchronized by two flip-flops, a rising TCK edge advances the TAP state
// machine and shifts, a falling edge updates TDO. TCK must therefore stay
// high and low for at least three system clocks each. The TAP only runs in
// JTAG mode; in RUN mode it is held in Test-Logic-Reset, while the
// configuration keeps its value.
//
// Instructions (4-bit IR, captures 0101):
//   CONFIG (2): 45-bit configuration chain, shifted LSB first:
//               five {parity, byte} pairs, in order ch0 low threshold, ch0 high
//               threshold, ch1 low, ch1 high, samples per anode minus one.
//               The parity bits are written as shifted in, not recomputed,
//               and are checked all the time: cfg_parity_err is high while
//               any stored byte has a wrong (even) parity.
//   SWSEL  (3): 2-bit JTAG switch select (0: chip only, 1..3: hybrid L,
//               hybrid R, serializer appended to the chain).
//   BIST   (4): loading it starts the built-in self test (bist_start pulse at
//               Update-IR); its 8-bit data register captures the BIST result
//               code.
//   BYPASS (F) and every other code: 1-bit bypass register.
// Reset values: thresholds 21 (low) and 26 (high) on both channels, the
// values used in the published compression test, and the maximum number of
// samples per anode. Parity-checked configuration registers, the BIST result
// on the JTAG output and the JTAG mode follow the chip description; the
// instruction set, codes and register layout are this design's own.
module jtag_unit
  import carlos_pkg::*;
#(
  parameter int unsigned SAMPLES = N_SAMPLES
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       enable,        // JTAG mode
  input  logic       tck,
  input  logic       tms,
  input  logic       tdi,
  output logic       tdo,
  output cfg_t       cfg,
  output logic       cfg_parity_err,
  output logic [1:0] sw_sel,
  output logic       bist_start,
  input  logic [7:0] bist_code
);

  typedef enum logic [3:0] {
    TLR, RTI, SEL_DR, CAP_DR, SH_DR, EX1_DR, PA_DR, EX2_DR, UPD_DR,
    SEL_IR, CAP_IR, SH_IR, EX1_IR, PA_IR, EX2_IR, UPD_IR
  } tap_e;

  // ---------------- input synchronizers ----------------
  logic [2:0] tck_s;
  logic [1:0] tms_s, tdi_s;
  logic       tck_rise, tck_fall;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tck_s <= '0;
      tms_s <= '1;
      tdi_s <= '0;
    end else begin
      tck_s <= {tck_s[1:0], tck};
      tms_s <= {tms_s[0], tms};
      tdi_s <= {tdi_s[0], tdi};
    end
  end
  assign tck_rise = enable &&  tck_s[1] && !tck_s[2];
  assign tck_fall = enable && !tck_s[1] &&  tck_s[2];
  logic tms_i, tdi_i;
  assign tms_i = tms_s[1];
  assign tdi_i = tdi_s[1];

  // ---------------- TAP state machine ----------------
  tap_e st, st_nx;
  always_comb begin
    unique case (st)
      TLR:    st_nx = tms_i ? TLR    : RTI;
      RTI:    st_nx = tms_i ? SEL_DR : RTI;
      SEL_DR: st_nx = tms_i ? SEL_IR : CAP_DR;
      CAP_DR: st_nx = tms_i ? EX1_DR : SH_DR;
      SH_DR:  st_nx = tms_i ? EX1_DR : SH_DR;
      EX1_DR: st_nx = tms_i ? UPD_DR : PA_DR;
      PA_DR:  st_nx = tms_i ? EX2_DR : PA_DR;
      EX2_DR: st_nx = tms_i ? UPD_DR : SH_DR;
      UPD_DR: st_nx = tms_i ? SEL_DR : RTI;
      SEL_IR: st_nx = tms_i ? TLR    : CAP_IR;
      CAP_IR: st_nx = tms_i ? EX1_IR : SH_IR;
      SH_IR:  st_nx = tms_i ? EX1_IR : SH_IR;
      EX1_IR: st_nx = tms_i ? UPD_IR : PA_IR;
      PA_IR:  st_nx = tms_i ? EX2_IR : PA_IR;
      EX2_IR: st_nx = tms_i ? UPD_IR : SH_IR;
      UPD_IR: st_nx = tms_i ? SEL_DR : RTI;
      default: st_nx = TLR;
    endcase
  end

  // ---------------- registers ----------------
  localparam cfg_t CFG_RESET = '{
    samples_m1: mk_pbyte(8'(SAMPLES - 1)),
    thr_high1:  mk_pbyte(8'd26),
    thr_low1:   mk_pbyte(8'd21),
    thr_high0:  mk_pbyte(8'd26),
    thr_low0:   mk_pbyte(8'd21)
  };

  logic [IR_W-1:0]  ir, ir_sr;
  logic [CFG_W-1:0] dr_sr;       // shared data shift register, LSB nearest TDO
  logic [7:0]       dr_len_m1;   // length of the selected data register minus one
  logic [CFG_W-1:0] dr_cap;

  always_comb begin
    dr_cap = '0;
    unique case (ir)
      IR_CONFIG: begin dr_len_m1 = 8'(CFG_W - 1); dr_cap = cfg; end
      IR_SWSEL:  begin dr_len_m1 = 8'd1;          dr_cap[1:0] = sw_sel; end
      IR_BIST:   begin dr_len_m1 = 8'd7;          dr_cap[7:0] = bist_code; end
      default:   begin dr_len_m1 = 8'd0;          dr_cap[0] = 1'b0; end
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st         <= TLR;
      ir         <= IR_BYPASS;
      ir_sr      <= '0;
      dr_sr      <= '0;
      cfg        <= CFG_RESET;
      sw_sel     <= '0;
      bist_start <= 1'b0;
      tdo        <= 1'b0;
    end else begin
      bist_start <= 1'b0;
      if (!enable) begin
        st <= TLR;
        ir <= IR_BYPASS;
      end else if (tck_rise) begin
        st <= st_nx;
        unique case (st)
          TLR:    ir <= IR_BYPASS;
          CAP_IR: ir_sr <= 4'b0101;
          SH_IR:  ir_sr <= {tdi_i, ir_sr[IR_W-1:1]};
          UPD_IR: begin
            ir <= ir_sr;
            if (ir_sr == IR_BIST) bist_start <= 1'b1;
          end
          CAP_DR: dr_sr <= dr_cap;
          SH_DR: begin
            // shift right inside the selected register's length
            for (int i = 0; i < CFG_W; i++) begin
              if (i < int'(dr_len_m1)) dr_sr[i] <= dr_sr[i + 1];
              else if (i == int'(dr_len_m1)) dr_sr[i] <= tdi_i;
            end
          end
          UPD_DR: begin
            unique case (ir)
              IR_CONFIG: cfg    <= cfg_t'(dr_sr);
              IR_SWSEL:  sw_sel <= dr_sr[1:0];
              default: ;
            endcase
          end
          default: ;
        endcase
      end else if (tck_fall) begin
        if (st == SH_IR)      tdo <= ir_sr[0];
        else if (st == SH_DR) tdo <= dr_sr[0];
        else                  tdo <= 1'b0;
      end
    end
  end

  // ---------------- configuration parity check ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) cfg_parity_err <= 1'b0;
    else cfg_parity_err <= (^cfg.thr_low0)  || (^cfg.thr_high0) ||
                           (^cfg.thr_low1)  || (^cfg.thr_high1) ||
                           (^cfg.samples_m1);
  end

endmodule
