// tb_pe_fsm: runs instructions through the FSMs of three PE positions and
// compares every cycle's control word and drive strobes with schedules
// written out by hand from the kernel descriptions: GEMM at PE(2,1), TRSM at
// the diagonal PE(1,1), LUD at PE(2,1) and PE(1,1), and the transfer
// instructions. Also checks each instruction's busy length.
// The GEMM and TRSM schedules follow the described panel updates step by
// step; the five-step LUD iteration and the bit order of the control word
// are this design's choices.
module tb_pe_fsm;
  import lac_pkg::*;

  logic       clk = 1'b0, rst_n, start;
  instr_t     instr;
  ctrl_word_t cw21, cw11;
  logic       rd21, cd21, b21, rd11, cd11, b11;
  logic       lm_en, lm_we, lm_to_rf, lm_en11, lm_we11, lm_to_rf11;
  logic [7:0] lm_addr, lm_addr11;
  int checks = 0, failures = 0;

  pe_fsm #(.NR(4), .ROW(2), .COL(1)) dut21 (.clk, .rst_n, .start, .instr,
    .cw(cw21), .row_drv(rd21), .col_drv(cd21),
    .lm_en, .lm_we, .lm_addr, .lm_to_rf, .busy(b21));
  pe_fsm #(.NR(4), .ROW(1), .COL(1)) dut11 (.clk, .rst_n, .start, .instr,
    .cw(cw11), .row_drv(rd11), .col_drv(cd11),
    .lm_en(lm_en11), .lm_we(lm_we11), .lm_addr(lm_addr11), .lm_to_rf(lm_to_rf11), .busy(b11));

  always #5 clk = ~clk;

  typedef struct packed {
    ctrl_word_t cw;
    logic       rdrv;
    logic       cdrv;
  } step_t;

  step_t got21 [16], got11 [16];
  int    len21, len11;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic step_t mk(alu_op_e op, bit en, int wa, int ra2, int ra1, bit rbr, bit cbr,
                               bit rdrv = 0, bit cdrv = 0);
    step_t s;
    s.cw   = '{alu_op: op, rf_en: en, write_addr: 3'(wa), read_addr2: 3'(ra2),
               read_addr1: 3'(ra1), row_buff_rd: rbr, col_buff_rd: cbr};
    s.rdrv = rdrv;
    s.cdrv = cdrv;
    return s;
  endfunction

  logic [3:0] lm_seen [16];   // {lm_en, lm_we, lm_to_rf, addr==0x5a}
  task automatic exec(opcode_e op, logic [2:0] rsel, logic [7:0] addr = 8'h00);
    @(negedge clk);
    start = 1'b1; instr = '{op: op, rsel: rsel, addr: addr};
    @(negedge clk);
    start = 1'b0;
    len21 = 0; len11 = 0;
    for (int s = 0; s < 16; s++) begin
      got21[s] = '0; got11[s] = '0;
      lm_seen[s] = '0;
      if (b21) begin got21[s] = '{cw21, rd21, cd21}; len21++; lm_seen[s] = {lm_en, lm_we, lm_to_rf, lm_addr == 8'h5a}; end
      if (b11) begin got11[s] = '{cw11, rd11, cd11}; len11++; end
      @(negedge clk);
    end
  endtask

  task automatic compare(string name, input step_t got [16], input step_t exp [16]);
    for (int s = 0; s < 16; s++)
      check(got[s] == exp[s], $sformatf("%s step %0d: got %h want %h", name, s, got[s], exp[s]));
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    step_t e [16];
    rst_n = 1'b0; start = 1'b0; instr = '{op: OP_NOP, rsel: '0, addr: '0};
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;

    // GEMM: column broadcasts of row s in step s, MAC with A(i,s-1) in step s.
    exec(OP_GEMM, 3'd0);
    check(len21 == 5, "GEMM takes NR+1 = 5 cycles");
    e = '{default: '0};
    e[0] = mk(ALU_MOV, 0, 0, 0, 0, 0, 1);
    e[1] = mk(ALU_MAC, 1, 5, 0, 0, 0, 1);
    e[2] = mk(ALU_MAC, 1, 5, 4, 1, 0, 1, 0, 1);   // row 2 broadcasts B(2,1)
    e[3] = mk(ALU_MAC, 1, 5, 0, 2, 0, 1);
    e[4] = mk(ALU_MAC, 1, 5, 0, 3, 0, 0);
    compare("GEMM PE(2,1)", got21, e);

    // TRSM at the diagonal PE(1,1): 3*NR = 12 cycles.
    exec(OP_TRSM, 3'd0);
    check(len11 == 12, "TRSM takes 3*NR = 12 cycles");
    e = '{default: '0};
    e[0]  = mk(ALU_MOV, 1, 5, 1, 1, 0, 0);        // r11 = 1/A11
    e[1]  = mk(ALU_MOV, 0, 0, 5, 0, 1, 0, 1, 0);  // r11 along row 1
    e[3]  = mk(ALU_MOV, 0, 0, 0, 0, 0, 1);        // receive X(0,1)
    e[4]  = mk(ALU_MSUB, 1, 4, 0, 0, 0, 0);       // B11 -= A10 * X01
    e[5]  = mk(ALU_MUL, 1, 4, 6, 4, 0, 0);        // X11 = B11 * r11
    e[6]  = mk(ALU_MOV, 0, 0, 4, 0, 0, 0, 0, 1);  // X11 down column 1
    compare("TRSM PE(1,1)", got11, e);

    // LUD: 5*(NR-1) = 15 cycles.
    exec(OP_LUD, 3'd0);
    check(len21 == 15 && len11 == 15, "LUD takes 15 cycles");
    e = '{default: '0};
    e[1]  = mk(ALU_MOV, 0, 0, 0, 0, 0, 1);        // u01 (column 1)
    e[3]  = mk(ALU_MOV, 0, 0, 0, 0, 1, 0);        // l20
    e[4]  = mk(ALU_MSUB, 1, 4, 0, 6, 0, 0);       // a21 -= l20 * u01
    e[6]  = mk(ALU_MOV, 0, 0, 0, 0, 0, 1);        // r11
    e[7]  = mk(ALU_MUL, 1, 4, 7, 4, 0, 0);        // l21 = a21 * r11
    e[8]  = mk(ALU_MOV, 0, 0, 4, 0, 0, 0, 1, 0);  // l21 along row 2
    compare("LUD PE(2,1)", got21, e);
    e = '{default: '0};
    e[1]  = mk(ALU_MOV, 0, 0, 0, 0, 0, 1);
    e[3]  = mk(ALU_MOV, 0, 0, 0, 0, 1, 0);
    e[4]  = mk(ALU_MSUB, 1, 4, 0, 6, 0, 0);
    e[5]  = mk(ALU_MOV, 1, 5, 1, 4, 0, 0);        // r11 = 1/u11
    e[6]  = mk(ALU_MOV, 0, 0, 5, 0, 0, 0, 0, 1);  // r11 down column 1
    compare("LUD PE(1,1)", got11, e);

    // Transfers.
    exec(OP_LOAD_ROWREP, 3'd0);
    check(len21 == 5, "LOAD_ROWREP takes 5 cycles");
    e = '{default: '0};
    for (int s = 0; s < 5; s++) e[s] = mk(ALU_MOV, s > 0, s > 0 ? s - 1 : 0, 0, s > 0 ? 6 : 0, s < 4, 0);
    compare("LOAD_ROWREP PE(2,1)", got21, e);
    exec(OP_LOAD_PANEL, 3'd4);
    e = '{default: '0};
    for (int s = 0; s < 4; s++) e[s] = mk(ALU_MOV, 0, 0, 0, 0, 1, 0);
    e[2] = mk(ALU_MOV, 1, 4, 0, 6, 1, 0);
    compare("LOAD_PANEL PE(2,1)", got21, e);
    exec(OP_STORE_PANEL, 3'd3);
    check(len21 == 4, "STORE takes NR = 4 cycles");
    e = '{default: '0};
    e[1] = mk(ALU_MOV, 0, 0, 3, 0, 0, 0, 1, 0);
    compare("STORE PE(2,1)", got21, e);

    // Local memory: LM_READ reads in step 0 and writes R[rsel] in step 1;
    // LM_WRITE writes R[rsel] (second read port) in its only step.
    exec(OP_LM_READ, 3'd3, 8'h5a);
    check(len21 == 2, "LM_READ takes 2 cycles");
    check(lm_seen[0] == 4'b1001 && lm_seen[1] == 4'b0011, "LM_READ strobes");
    e = '{default: '0};
    e[1] = mk(ALU_MOV, 1, 3, 0, 0, 0, 0);
    compare("LM_READ PE(2,1)", got21, e);
    exec(OP_LM_WRITE, 3'd2, 8'h5a);
    check(len21 == 1, "LM_WRITE takes 1 cycle");
    check(lm_seen[0] == 4'b1101, "LM_WRITE strobes");
    e = '{default: '0};
    e[0] = mk(ALU_MOV, 0, 0, 2, 0, 0, 0);
    compare("LM_WRITE PE(2,1)", got21, e);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
