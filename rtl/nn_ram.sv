// nn_ram: on-chip memory with one write port and one synchronous read port.
//
// Used three times in the face detector: as the weight memory (400 x 300
// layer-1 weights followed by 300 layer-2 weights, one word each, which is
// what an FPGA's block and distributed RAM hold for the 16-bit format), as
// the 400-word input image buffer and as the 300-word hidden-node buffer.
// Written as a plain array so that synthesis maps it to block RAM.
//
// Interface: a word is written on a rising edge when we is high; rdata shows
// the word at raddr one edge after raddr is presented (a write and a read of
// the same address on the same edge return the old word). Contents are not
// reset.
//
// The weight count and word width follow the thesis; the port arrangement is
// this design's choice.
module nn_ram #(
  parameter int unsigned DEPTH = 120300,
  parameter int unsigned WIDTH = 16,
  parameter int unsigned AW    = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic             clk,
  input  logic             we,
  input  logic [AW-1:0]    waddr,
  input  logic [WIDTH-1:0] wdata,
  input  logic [AW-1:0]    raddr,
  output logic [WIDTH-1:0] rdata
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    rdata <= mem[raddr];
  end

endmodule
