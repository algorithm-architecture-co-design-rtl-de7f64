// pe: one processing element of the NR x NR array.
//
// Datapath: a register file (six registers R0..R5, two read ports and one
// write port), a row broadcast buffer and a column broadcast buffer, the
// ALU (MAC unit; diagonal PEs also carry the reciprocal unit) and a
// single-ported local memory of 256 words that exchanges words with the
// register file (LM_READ: LM -> R[rsel] in two cycles; LM_WRITE: R[rsel] ->
// LM through the second read port in one cycle). Read
// addresses 6 and 7 select the row and column buffers, so the PE sees eight
// addressable registers. The PE's FSM controller (pe_fsm) produces the
// control word every cycle.
//
// Buses: the PE offers its second read-port value to its row bus and to its
// column bus when the FSM raises row_drv / col_drv (outputs are zero
// otherwise, and the array ORs them). A buffer whose control bit
// row_buff_rd / col_buff_rd is set loads the bus value at the clock edge,
// so a value broadcast in cycle t can be used by any PE in cycle t+1.
// The ALU result is written to the destination register at the clock edge.
// rst_n is also used by the assertion's disable condition, which lint
// reports as a net used both synchronously and asynchronously; the circuit
// itself uses it only as the asynchronous reset.
// The parts of the PE and the diagonal-only reciprocal unit follow the
// described PE; the register map (R0..R5, buffers at 6 and 7), the bus-drive
// strobes and the extra accumulator read tap of the register file are this
// design's choices.
module pe
  import lac_pkg::*;
#(
  parameter int unsigned NR     = 4,
  parameter int unsigned DATA_W = 32,
  parameter int unsigned FRAC_W = 16,
  parameter int unsigned ROW    = 0,
  parameter int unsigned COL    = 0
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  instr_t            instr,
  input  logic [DATA_W-1:0] row_bus,
  input  logic [DATA_W-1:0] col_bus,
  output logic [DATA_W-1:0] row_out,
  output logic [DATA_W-1:0] col_out,
  output logic              row_drv,
  output logic              col_drv,
  output logic              busy
);
  ctrl_word_t        cw;
  logic              lm_en, lm_we, lm_to_rf;
  logic [LM_AW-1:0]  lm_addr;
  logic [DATA_W-1:0] lm_rdata, rf_wdata;
  logic [DATA_W-1:0] rb, cb;
  logic [DATA_W-1:0] rf_rd1, rf_rd2, rf_acc;
  logic [DATA_W-1:0] rd1, rd2, result;

  pe_fsm #(.NR(NR), .ROW(ROW), .COL(COL)) u_fsm (
    .clk, .rst_n, .start, .instr, .cw, .row_drv, .col_drv,
    .lm_en, .lm_we, .lm_addr, .lm_to_rf, .busy
  );

  pe_regfile #(.DATA_W(DATA_W), .DEPTH(NREG), .AW(3)) u_rf (
    .clk, .rst_n,
    .raddr1(cw.read_addr1), .raddr2(cw.read_addr2),
    .rdata1(rf_rd1), .rdata2(rf_rd2),
    .we(cw.rf_en), .waddr(cw.write_addr), .wdata(rf_wdata),
    .wa_rdata(rf_acc)
  );

  // Operand selection: addresses 6 and 7 name the broadcast buffers.
  function automatic logic [DATA_W-1:0] operand(logic [2:0] a, logic [DATA_W-1:0] rf_val,
                                                logic [DATA_W-1:0] rbv, logic [DATA_W-1:0] cbv);
    if (a == ADDR_RB)      return rbv;
    else if (a == ADDR_CB) return cbv;
    else                   return rf_val;
  endfunction

  assign rd1 = operand(cw.read_addr1, rf_rd1, rb, cb);
  assign rd2 = operand(cw.read_addr2, rf_rd2, rb, cb);

  pe_alu #(.DATA_W(DATA_W), .FRAC_W(FRAC_W), .HAS_RECIP(ROW == COL)) u_alu (
    .op(cw.alu_op), .recip_sel(cw.read_addr2 != 3'd0),
    .rd1(rd1), .rd2(rd2), .cb(cb), .acc(rf_acc), .result(result)
  );

  local_mem #(.DATA_W(DATA_W), .DEPTH(LM_DEPTH)) u_lm (
    .clk, .en(lm_en), .we(lm_we), .addr(lm_addr), .wdata(rd2), .rdata(lm_rdata)
  );

  assign rf_wdata = lm_to_rf ? lm_rdata : result;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rb <= '0;
      cb <= '0;
    end else begin
      if (cw.row_buff_rd) rb <= row_bus;
      if (cw.col_buff_rd) cb <= col_bus;
    end
  end

  assign row_out = row_drv ? rd2 : '0;
  assign col_out = col_drv ? rd2 : '0;

  // The datapath writes only general registers.
  a_wr_range : assert property (@(posedge clk) disable iff (!rst_n)
                                cw.rf_en |-> (int'(cw.write_addr) < int'(NREG)));
endmodule
