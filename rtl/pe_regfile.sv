// pe_regfile: register file of one processing element.
//
// DEPTH registers of DATA_W bits with two combinational read ports (operand
// and broadcast source) and one synchronous write port. A third read tap
// returns the register addressed by the write port, so that a
// multiply-accumulate can add into its destination in the same cycle.
// Registers reset to zero. Out-of-range read addresses return zero and
// out-of-range writes are ignored (the PE maps those addresses onto its
// broadcast buffers instead).
// The two read ports and one write port follow the described register file;
// the accumulator tap and the size of six registers (eight addresses with
// the two buffers) are this design's choices.
module pe_regfile #(
  parameter int unsigned DATA_W = 32,
  parameter int unsigned DEPTH  = 6,
  parameter int unsigned AW     = 3
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [AW-1:0]     raddr1,
  input  logic [AW-1:0]     raddr2,
  output logic [DATA_W-1:0] rdata1,
  output logic [DATA_W-1:0] rdata2,
  input  logic              we,
  input  logic [AW-1:0]     waddr,
  input  logic [DATA_W-1:0] wdata,
  output logic [DATA_W-1:0] wa_rdata
);
  logic [DATA_W-1:0] regs [DEPTH];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(DEPTH); i++) regs[i] <= '0;
    end else if (we && (int'(waddr) < int'(DEPTH))) begin
      regs[waddr] <= wdata;
    end
  end

  always_comb begin
    rdata1   = (int'(raddr1) < int'(DEPTH)) ? regs[raddr1] : '0;
    rdata2   = (int'(raddr2) < int'(DEPTH)) ? regs[raddr2] : '0;
    wa_rdata = (int'(waddr)  < int'(DEPTH)) ? regs[waddr]  : '0;
  end
endmodule
