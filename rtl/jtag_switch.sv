// jtag_switch: lets the chip's single JTAG port reach three further devices,
// the left hybrid, the right hybrid and the serializer (ports 0, 1, 2).
//
// The chip's own TAP is always first in the chain. With sel = 0 the chain
// ends there and TDO is the chip's own. With sel = k (1..3) port k-1 is
// appended: it receives TCK and TMS, its TDI is the chip's own TDO, and its
// TDO becomes the chip's TDO. Unselected ports see TCK held low and TMS high,
// so they receive no clock edges and keep their state.
// Outside JTAG mode (enable low) no port is driven. One input and three output
// JTAG ports follow the chip description; the chain arrangement and select
// encoding are this design's own. Purely combinational.
module jtag_switch (
  input  logic       enable,
  input  logic [1:0] sel,
  input  logic       tck,
  input  logic       tms,
  input  logic       own_tdo,
  output logic       tdo,
  output logic [2:0] port_tck,
  output logic [2:0] port_tms,
  output logic [2:0] port_tdi,
  input  logic [2:0] port_tdo
);

  always_comb begin
    for (int k = 0; k < 3; k++) begin
      logic on;
      on          = enable && (sel == 2'(k + 1));
      port_tck[k] = on ? tck : 1'b0;
      port_tms[k] = on ? tms : 1'b1;
      port_tdi[k] = on ? own_tdo : 1'b0;
    end
    tdo = (sel == 2'd0) ? own_tdo : port_tdo[sel - 2'd1];
    if (!enable) tdo = 1'b0;
  end

endmodule
