// local_mem: the local memory of one processing element.
//
// A single-ported synchronous SRAM of DEPTH words (256 x 32 bits = 1 KB by
// default) that lets a core keep a block of operands close to the PEs while
// many panel updates reuse it. One access per cycle: with en and we high,
// wdata is written at addr; with en high and we low, the word at addr
// appears on rdata after the clock edge and stays there until the next read.
// Written as an array so that synthesis can map it to an SRAM macro; the
// contents are not reset.
// The size (256 words per PE, 1 KB) and the single port follow the
// described core configuration; the one-cycle read latency and the
// instruction-level access from the register file are this design's choice.
module local_mem #(
  parameter int unsigned DATA_W = 32,
  parameter int unsigned DEPTH  = 256,
  parameter int unsigned AW     = $clog2(DEPTH)
) (
  input  logic              clk,
  input  logic              en,
  input  logic              we,
  input  logic [AW-1:0]     addr,
  input  logic [DATA_W-1:0] wdata,
  output logic [DATA_W-1:0] rdata
);
  logic [DATA_W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (en) begin
      if (we) mem[addr] <= wdata;
      else    rdata     <= mem[addr];
    end
  end
endmodule
