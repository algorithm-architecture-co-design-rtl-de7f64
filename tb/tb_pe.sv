// tb_pe: exercises single processing elements with the testbench playing
// the rest of the array on the buses. An off-diagonal PE(1,2) loads a row
// of A, an element of B and of C, takes part in a GEMM panel update
// (receiving B(k,2) on its column bus and broadcasting its own B(1,2) in
// step 1) and stores C; it also moves words through its local memory. A diagonal PE(1,1) runs the first TRSM steps and
// must broadcast 1/A11 on its row bus.
// The GEMM and TRSM steps follow the described panel updates; register
// numbers and the local-memory instructions are this design's own.
module tb_pe;
  import lac_pkg::*;
  import tb_fx_pkg::*;

  logic        clk = 1'b0, rst_n, start;
  instr_t      instr;
  logic [31:0] rbus, cbus;
  logic [31:0] ro12, co12, ro11, co11;
  logic        rd12, cd12, rd11, cd11, b12, b11;
  int checks = 0, failures = 0;

  pe #(.NR(4), .DATA_W(32), .FRAC_W(16), .ROW(1), .COL(2)) dut12 (
    .clk, .rst_n, .start, .instr, .row_bus(rbus), .col_bus(cbus),
    .row_out(ro12), .col_out(co12), .row_drv(rd12), .col_drv(cd12), .busy(b12));
  pe #(.NR(4), .DATA_W(32), .FRAC_W(16), .ROW(1), .COL(1)) dut11 (
    .clk, .rst_n, .start, .instr, .row_bus(rbus), .col_bus(cbus),
    .row_out(ro11), .col_out(co11), .row_drv(rd11), .col_drv(cd11), .busy(b11));

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // Run one instruction; rv/cv give the bus values of each step, and the
  // PE outputs of every step are recorded.
  logic [31:0] o_ro12 [16], o_co12 [16], o_ro11 [16];
  logic        o_rd12 [16], o_cd12 [16], o_rd11 [16];
  task automatic exec(opcode_e op, logic [2:0] rsel, input int rv [16], input int cv [16],
                      input logic [7:0] addr = 8'h00);
    @(negedge clk);
    start = 1'b1; instr = '{op: op, rsel: rsel, addr: addr};
    @(negedge clk);
    start = 1'b0;
    for (int s = 0; s < 16; s++) begin
      rbus = rv[s]; cbus = cv[s];
      #1;
      o_ro12[s] = ro12; o_co12[s] = co12; o_ro11[s] = ro11;
      o_rd12[s] = rd12; o_cd12[s] = cd12; o_rd11[s] = rd11;
      @(negedge clk);
    end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int a [4], b [4], c, e, bself;
    int rv [16], cv [16];
    rst_n = 1'b0; start = 1'b0; instr = '{op: OP_NOP, rsel: '0, addr: '0}; rbus = 0; cbus = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;

    for (int t = 0; t < 20; t++) begin
      for (int k = 0; k < 4; k++) begin a[k] = rnd(4); b[k] = rnd(4); end
      a[1] = (a[1] == 0) ? ONE : a[1];
      c = rnd(4);
      bself = b[1];
      // Row 1 of A, replicated: element k on the row bus in step k.
      rv = '{default: 0}; cv = '{default: 0};
      for (int k = 0; k < 4; k++) rv[k] = a[k];
      exec(OP_LOAD_ROWREP, 3'd0, rv, cv);
      // B(1,2) arrives in step 2 (column 2); other columns' values in other steps.
      rv = '{default: 0};
      for (int k = 0; k < 4; k++) rv[k] = (k == 2) ? bself : rnd(4);
      exec(OP_LOAD_PANEL, R_BVAL, rv, cv);
      rv = '{default: 0};
      for (int k = 0; k < 4; k++) rv[k] = (k == 2) ? c : rnd(4);
      exec(OP_LOAD_PANEL, R_CVAL, rv, cv);
      // GEMM: column bus carries B(k,2) in step k; in step 1 this PE is the source.
      rv = '{default: 0}; cv = '{default: 0};
      for (int k = 0; k < 4; k++) cv[k] = b[k];
      exec(OP_GEMM, 3'd0, rv, cv);
      check(o_cd12[1] && o_co12[1] == bself, "PE(1,2) broadcasts its B in step 1");
      check(!o_cd12[0] && !o_cd12[2] && !o_cd12[3] && o_co12[0] == 0, "PE(1,2) silent in other steps");
      e = c;
      for (int k = 0; k < 4; k++) e += fxmul(a[k], b[k]);
      rv = '{default: 0}; cv = '{default: 0};
      exec(OP_STORE_PANEL, R_CVAL, rv, cv);
      check(o_rd12[2] && o_ro12[2] == e, $sformatf("C after GEMM %0d want %0d", o_ro12[2], e));
      check(!o_rd12[0] && !o_rd12[1] && !o_rd12[3], "store uses step COL only");
      // Local memory round trip: C -> LM[t+7], then LM[t+7] -> R2, store R2.
      exec(OP_LM_WRITE, R_CVAL, rv, cv, 8'(t + 7));
      exec(OP_LM_WRITE, 3'd0, rv, cv, 8'(t + 100));
      exec(OP_LM_READ, 3'd2, rv, cv, 8'(t + 7));
      exec(OP_STORE_PANEL, 3'd2, rv, cv);
      check(o_rd12[2] && o_ro12[2] == e, "local memory round trip");
      exec(OP_LM_READ, 3'd2, rv, cv, 8'(t + 100));
      exec(OP_STORE_PANEL, 3'd2, rv, cv);
      check(o_ro12[2] == a[0], "local memory keeps a second word");
      // TRSM steps 0..1 in the diagonal PE(1,1): broadcast r = 1/A11 on the row bus.
      exec(OP_TRSM, 3'd0, rv, cv);
      check(o_rd11[1] && o_ro11[1] == fxrecip(a[1]), $sformatf("PE(1,1) r = %0d want %0d", o_ro11[1], fxrecip(a[1])));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
