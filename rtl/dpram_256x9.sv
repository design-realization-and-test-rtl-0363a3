// dpram_256x9: dual-port static RAM of 256 words x 9 bits, the row buffer used
// by the 2D compressor (four of them on the chip, two per input channel).
//
// The 9-bit word holds an 8-bit sample and its parity bit. One write port and
// one read port, both synchronous to clk. A read returns, one cycle after the
// address is presented, the word stored at that address before any write of
// the same cycle (read-first). The output register holds its value while
// re is low. The size follows the chip description; the port protocol is this
// design's own, as the macro's ports are not published. The array is
// written as plain SystemVerilog so any RAM compiler or flop array can map it.
module dpram_256x9 #(
  parameter int unsigned DEPTH = 256,
  parameter int unsigned WIDTH = 9,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic             clk,
  // write port
  input  logic             we,
  input  logic [AW-1:0]    waddr,
  input  logic [WIDTH-1:0] wdata,
  // read port
  input  logic             re,
  input  logic [AW-1:0]    raddr,
  output logic [WIDTH-1:0] rdata
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  always_ff @(posedge clk) begin
    if (re) rdata <= mem[raddr];
  end

endmodule
