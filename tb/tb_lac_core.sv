// tb_lac_core: end-to-end test of one core at its default size (4x4 PEs,
// 32-bit Q16.16 data).
//
// The testbench plays the on-chip memory and the local program: it streams
// panels in over the row buses, issues panel updates, reads results back and
// compares them with a software model of the same fixed-point algorithms.
// It runs GEMM, GEMV, TRSM and LUD panel updates, an SpMV and an SpMM on
// block-compressed (BCSC / BCSR) matrices whose index matching is done here,
// a 4x4 matrix inverse built from LUD -> TRSM -> TRSM -> GEMM, and a
// blocked GEMM whose B panels are parked in the PEs' local memories. Every
// instruction's cycle count is checked against the schedule length, and a
// second instruction is offered while the core is busy to exercise the
// ready/valid back-pressure. Each mechanism must have happened at least once.
// It also measures the PE utilisation of each panel update (PE-cycles in
// which a PE writes, latches or drives, over all PE-cycles) and checks the
// closed forms 1 for GEMM/GEMV/SpMV/SpMM and (2+NR)/(3NR) for TRSM.
// The kernels, their data mappings and the cycle counts of GEMM-like
// updates and TRSM follow the described panel updates; the LUD length and
// the transfer instructions are this design's own.
module tb_lac_core;
  import lac_pkg::*;
  import tb_fx_pkg::*;

  localparam int NR = 4;

  logic        clk = 1'b0;
  logic        rst_n;
  logic        instr_valid;
  instr_t      instr;
  logic        instr_ready, done, in_rd, out_valid;
  logic [1:0]  in_col, out_col;
  logic [31:0] in_data  [NR];
  logic [31:0] out_data [NR];

  int checks = 0, failures = 0;
  int n_gemm = 0, n_gemv = 0, n_spmv = 0, n_spmm = 0, n_trsm = 0, n_lud = 0, n_inv = 0;
  int n_loadp = 0, n_loadr = 0, n_store = 0, n_bp = 0, n_lmr = 0, n_lmw = 0, n_blk = 0;

  int ld [NR][NR];   // panel offered on the row buses: element (i, col)
  int st [NR][NR];   // panel captured from STORE_PANEL

  lac_core dut (
    .clk, .rst_n, .instr_valid, .instr, .instr_ready, .done,
    .in_rd, .in_col, .in_data, .out_valid, .out_col, .out_data
  );

  always #5 clk = ~clk;

  // A PE is active in a cycle when it writes a register, latches a bus or
  // drives one. act_sum / act_cyc collect the PE-cycles per opcode so that
  // the utilisation ratio of each panel update can be compared with the
  // closed forms (GEMM-like kernels 1, TRSM (2+NR)/(3NR)).
  logic act [NR][NR];
  int   act_sum [opcode_e];
  int   act_cyc [opcode_e];
  for (genvar gi = 0; gi < NR; gi++) begin : g_act_r
    for (genvar gj = 0; gj < NR; gj++) begin : g_act_c
      assign act[gi][gj] = dut.g_row[gi].g_col[gj].u_pe.cw.rf_en |
                           dut.g_row[gi].g_col[gj].u_pe.cw.row_buff_rd |
                           dut.g_row[gi].g_col[gj].u_pe.cw.col_buff_rd |
                           dut.g_row[gi].g_col[gj].u_pe.row_drv |
                           dut.g_row[gi].g_col[gj].u_pe.col_drv;
    end
  end

  always_comb for (int i = 0; i < NR; i++) in_data[i] = ld[i][in_col];

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int expected_cycles(opcode_e op);
    case (op)
      OP_TRSM:        return 12;  // 3*NR
      OP_LUD:         return 15;  // 5*(NR-1)
      OP_STORE_PANEL: return 4;   // NR
      OP_LM_READ:     return 2;
      OP_LM_WRITE:    return 1;
      default:        return 5;   // NR+1
    endcase
  endfunction

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // Offer an instruction, wait for acceptance, then (unless nowait) follow
  // it to completion, counting its cycles and capturing stored data.
  task automatic run(opcode_e op, logic [2:0] rsel, bit nowait = 1'b0, logic [7:0] addr = 8'h00);
    int cyc, na;
    @(negedge clk);
    instr_valid = 1'b1;
    instr       = '{op: op, rsel: rsel, addr: addr};
    if (!instr_ready) n_bp++;
    while (!instr_ready) @(negedge clk);
    @(posedge clk);
    #1 instr_valid = 1'b0;
    if (nowait) return;
    cyc = 0;
    do begin
      @(negedge clk);
      cyc++;
      na = 0;
      for (int i = 0; i < NR; i++) for (int j = 0; j < NR; j++) na += int'(act[i][j]);
      if (!act_sum.exists(op)) begin act_sum[op] = 0; act_cyc[op] = 0; end
      act_sum[op] += na;
      act_cyc[op]++;
      if (out_valid) for (int i = 0; i < NR; i++) st[i][out_col] = out_data[i];
    end while (!done);
    check(cyc == expected_cycles(op), $sformatf("%s took %0d cycles", op.name(), cyc));
    case (op)
      OP_LOAD_PANEL:  n_loadp++;
      OP_LOAD_ROWREP: n_loadr++;
      OP_STORE_PANEL: n_store++;
      OP_LM_READ:     n_lmr++;
      OP_LM_WRITE:    n_lmw++;
      default: ;
    endcase
  endtask

  task automatic load_panel(logic [2:0] r, input int m [NR][NR]);
    ld = m;
    run(OP_LOAD_PANEL, r);
  endtask

  task automatic load_rowrep(input int m [NR][NR]);
    ld = m;
    run(OP_LOAD_ROWREP, 3'd0);
  endtask

  task automatic store(logic [2:0] r, output int m [NR][NR]);
    run(OP_STORE_PANEL, r);
    m = st;
  endtask

  // ---------------------------------------------------------------- models
  function automatic void ref_trsm(input int a [NR][NR], inout int b [NR][NR]);
    int r [NR];
    for (int i = 0; i < NR; i++) r[i] = fxrecip(a[i][i]);
    for (int j = 0; j < NR; j++) b[0][j] = fxmul(b[0][j], r[0]);
    for (int m = 0; m < NR - 1; m++) begin
      for (int i = m + 1; i < NR; i++)
        for (int j = 0; j < NR; j++) b[i][j] = b[i][j] - fxmul(a[i][m], b[m][j]);
      for (int j = 0; j < NR; j++) b[m+1][j] = fxmul(b[m+1][j], r[m+1]);
    end
  endfunction

  function automatic void ref_lud(inout int a [NR][NR]);
    int r;
    for (int m = 0; m < NR - 1; m++) begin
      r = fxrecip(a[m][m]);
      for (int i = m + 1; i < NR; i++) a[i][m] = fxmul(a[i][m], r);
      for (int i = m + 1; i < NR; i++)
        for (int j = m + 1; j < NR; j++) a[i][j] = a[i][j] - fxmul(a[i][m], a[m][j]);
    end
  endfunction

  function automatic bit close(int a, real b, real tol);
    real d;
    d = tor(a) - b;
    if (d < 0.0) d = -d;
    return d <= tol;
  endfunction

  // ---------------------------------------------------------------- tests
  task automatic test_gemm(opcode_e op);
    int a [NR][NR], b [NR][NR], c [NR][NR], e [NR][NR], q [NR][NR];
    for (int i = 0; i < NR; i++)
      for (int j = 0; j < NR; j++) begin
        a[i][j] = rnd(3); b[i][j] = rnd(3); c[i][j] = rnd(3);
      end
    e = c;
    for (int i = 0; i < NR; i++)
      for (int j = 0; j < NR; j++)
        for (int k = 0; k < NR; k++) e[i][j] += fxmul(a[i][k], b[k][j]);
    load_rowrep(a);
    load_panel(R_BVAL, b);
    load_panel(R_CVAL, c);
    run(op, 3'd0);
    store(R_CVAL, q);
    for (int i = 0; i < NR; i++)
      for (int j = 0; j < NR; j++)
        check(q[i][j] == e[i][j], $sformatf("%s C[%0d][%0d] %0d != %0d", op.name(), i, j, q[i][j], e[i][j]));
    if (op == OP_GEMM) n_gemm++; else n_spmm++;
  endtask

  // GEMV: every PE column j multiplies its own 4x4 matrix aj[j] by the
  // replicated vector b, updating its own 4-element slice of c.
  task automatic test_gemv(opcode_e op, input int aj [NR][NR][NR], input int bv [NR][NR],
                           inout int cv [NR][NR]);
    int p [NR][NR], q [NR][NR];
    int e [NR][NR];
    for (int k = 0; k < NR; k++) begin
      for (int i = 0; i < NR; i++) for (int j = 0; j < NR; j++) p[i][j] = aj[j][i][k];
      load_panel(3'(k), p);
    end
    for (int i = 0; i < NR; i++) for (int j = 0; j < NR; j++) p[i][j] = bv[j][i];
    load_panel(R_BVAL, p);
    for (int i = 0; i < NR; i++) for (int j = 0; j < NR; j++) p[i][j] = cv[j][i];
    load_panel(R_CVAL, p);
    for (int j = 0; j < NR; j++)
      for (int i = 0; i < NR; i++) begin
        e[j][i] = cv[j][i];
        for (int k = 0; k < NR; k++) e[j][i] += fxmul(aj[j][i][k], bv[j][k]);
      end
    run(op, 3'd0);
    store(R_CVAL, q);
    for (int j = 0; j < NR; j++)
      for (int i = 0; i < NR; i++) begin
        check(q[i][j] == e[j][i], $sformatf("%s c[%0d] of column %0d", op.name(), i, j));
        cv[j][i] = q[i][j];
      end
    if (op == OP_GEMV) n_gemv++; else n_spmv++;
  endtask

  task automatic test_dense_gemv();
    int aj [NR][NR][NR], bv [NR][NR], cv [NR][NR], b [NR];
    for (int k = 0; k < NR; k++) b[k] = rnd(3);
    for (int j = 0; j < NR; j++)
      for (int i = 0; i < NR; i++) begin
        cv[j][i] = rnd(3);
        bv[j][i] = b[i];
        for (int k = 0; k < NR; k++) aj[j][i][k] = rnd(3);
      end
    test_gemv(OP_GEMV, aj, bv, cv);
  endtask

  // SpMV on a 12 x 8 matrix of 4x4 dense blocks stored block-compressed by
  // columns (BCSC: BlkCol_ptr, BlkRow_id). The four stored blocks go to the
  // four PE columns; the partial products are added into c by block row.
  task automatic test_spmv();
    int a [12][8], b [8], c [12], e [12];
    bit nz [3][2];
    int blkcol_ptr [3], blkrow_id [4], blkcol_of [4], nb;
    int aj [NR][NR][NR], bv [NR][NR], cv [NR][NR];
    nz = '{'{1, 0}, '{0, 1}, '{1, 1}};
    for (int r = 0; r < 12; r++) for (int k = 0; k < 8; k++)
      a[r][k] = nz[r / 4][k / 4] ? rnd(2) : 0;
    for (int k = 0; k < 8; k++) b[k] = rnd(2);
    for (int r = 0; r < 12; r++) c[r] = 0;
    nb = 0;
    for (int bc = 0; bc < 2; bc++) begin
      blkcol_ptr[bc] = nb;
      for (int br = 0; br < 3; br++) if (nz[br][bc]) begin
        blkrow_id[nb] = br; blkcol_of[nb] = bc; nb++;
      end
    end
    blkcol_ptr[2] = nb;
    check(nb == 4 && blkcol_ptr[1] == 2 && blkrow_id[0] == 0 && blkrow_id[1] == 2 && blkrow_id[2] == 1, "BCSC construction");
    for (int j = 0; j < NR; j++)
      for (int i = 0; i < NR; i++) begin
        cv[j][i] = 0;
        bv[j][i] = b[blkcol_of[j] * 4 + i];
        for (int k = 0; k < NR; k++) aj[j][i][k] = a[blkrow_id[j] * 4 + i][blkcol_of[j] * 4 + k];
      end
    test_gemv(OP_SPMV, aj, bv, cv);
    for (int j = 0; j < NR; j++)
      for (int i = 0; i < NR; i++) c[blkrow_id[j] * 4 + i] += cv[j][i];
    for (int r = 0; r < 12; r++) begin
      e[r] = 0;
      for (int k = 0; k < 8; k++) e[r] += fxmul(a[r][k], b[k]);
      check(c[r] == e[r], $sformatf("SpMV c[%0d] %0d != %0d", r, c[r], e[r]));
    end
  endtask

  // SpMM: A (8x8, BCSC) times B (8x8, BCSR); each output tile accumulates
  // the products of A blocks in block column k with B blocks in block row k.
  task automatic test_spmm();
    int a [8][8], b [8][8], e [8][8];
    bit anz [2][2], bnz [2][2];
    int ta [NR][NR], tb [NR][NR], tc [NR][NR];
    anz = '{'{1, 0}, '{1, 1}};
    bnz = '{'{0, 1}, '{1, 1}};
    for (int r = 0; r < 8; r++) for (int k = 0; k < 8; k++) begin
      a[r][k] = anz[r / 4][k / 4] ? rnd(2) : 0;
      b[r][k] = bnz[r / 4][k / 4] ? rnd(2) : 0;
    end
    for (int bi = 0; bi < 2; bi++)
      for (int bj = 0; bj < 2; bj++) begin
        bit any;
        any = 1'b0;
        for (int i = 0; i < NR; i++) for (int j = 0; j < NR; j++) tc[i][j] = 0;
        for (int bk = 0; bk < 2; bk++) if (anz[bi][bk] && bnz[bk][bj]) begin
          for (int i = 0; i < NR; i++) for (int j = 0; j < NR; j++) begin
            ta[i][j] = a[bi*4+i][bk*4+j];
            tb[i][j] = b[bk*4+i][bj*4+j];
          end
          load_rowrep(ta);
          load_panel(R_BVAL, tb);
          load_panel(R_CVAL, tc);
          run(OP_SPMM, 3'd0);
          store(R_CVAL, tc);
          n_spmm++;
          any = 1'b1;
        end
        for (int i = 0; i < NR; i++) for (int j = 0; j < NR; j++) begin
          e[i][j] = 0;
          for (int k = 0; k < 8; k++) e[i][j] += fxmul(a[bi*4+i][k], b[k][bj*4+j]);
          check(tc[i][j] == e[i][j], $sformatf("SpMM C[%0d][%0d]", bi*4+i, bj*4+j));
        end
      end
  endtask

  task automatic do_trsm(input int a [NR][NR], input int b [NR][NR], output int x [NR][NR]);
    load_rowrep(a);
    load_panel(R_BVAL, b);
    run(OP_TRSM, 3'd0);
    store(R_BVAL, x);
    n_trsm++;
  endtask

  task automatic do_lud(input int a [NR][NR], output int lu [NR][NR]);
    load_panel(R_BVAL, a);
    run(OP_LUD, 3'd0);
    store(R_BVAL, lu);
    n_lud++;
  endtask

  task automatic test_trsm();
    int a [NR][NR], b [NR][NR], x [NR][NR], e [NR][NR];
    real s;
    for (int i = 0; i < NR; i++)
      for (int j = 0; j < NR; j++) begin
        a[i][j] = (j < i) ? rnd(1) : 0;
        b[i][j] = rnd(2);
      end
    for (int i = 0; i < NR; i++) a[i][i] = (($urandom_range(1, 0) == 1) ? 1 : -1) * int'($urandom_range(4, 1)) * ONE;
    e = b;
    ref_trsm(a, e);
    do_trsm(a, b, x);
    for (int i = 0; i < NR; i++)
      for (int j = 0; j < NR; j++) begin
        check(x[i][j] == e[i][j], $sformatf("TRSM X[%0d][%0d] %0d != %0d", i, j, x[i][j], e[i][j]));
        s = 0.0;
        for (int k = 0; k < NR; k++) s += tor(a[i][k]) * tor(x[k][j]);
        check(close(b[i][j], s, 0.01), $sformatf("TRSM residual at [%0d][%0d]", i, j));
      end
  endtask

  task automatic test_lud();
    int a [NR][NR], lu [NR][NR], e [NR][NR];
    real s;
    for (int i = 0; i < NR; i++)
      for (int j = 0; j < NR; j++) a[i][j] = (i == j) ? int'($urandom_range(8, 4)) * ONE : rnd(1);
    e = a;
    ref_lud(e);
    do_lud(a, lu);
    for (int i = 0; i < NR; i++)
      for (int j = 0; j < NR; j++) begin
        check(lu[i][j] == e[i][j], $sformatf("LUD [%0d][%0d] %0d != %0d", i, j, lu[i][j], e[i][j]));
        s = 0.0;
        for (int k = 0; k < NR; k++)
          if (k <= j && k <= i) s += ((k == i) ? 1.0 : tor(lu[i][k])) * tor(lu[k][j]);
        check(close(a[i][j], s, 0.01), $sformatf("LUD residual at [%0d][%0d]", i, j));
      end
  endtask

  // Inverse of a 4x4 matrix: A = LU (LUD), L^-1 and U^-1 (TRSM with B = I;
  // U is upper triangular and is solved in reversed row/column order), then
  // A^-1 = U^-1 L^-1 (GEMM).
  task automatic test_inv();
    int a [NR][NR], lu [NR][NR], l [NR][NR], ur [NR][NR], id [NR][NR];
    int linv [NR][NR], xr [NR][NR], uinv [NR][NR], z [NR][NR], ainv [NR][NR];
    real s;
    for (int i = 0; i < NR; i++)
      for (int j = 0; j < NR; j++) begin
        a[i][j]  = (i == j) ? int'($urandom_range(8, 4)) * ONE : rnd(1);
        id[i][j] = (i == j) ? ONE : 0;
        z[i][j]  = 0;
      end
    do_lud(a, lu);
    for (int i = 0; i < NR; i++)
      for (int j = 0; j < NR; j++) begin
        l[i][j]  = (j < i) ? lu[i][j] : ((i == j) ? ONE : 0);
        ur[i][j] = (j <= i) ? lu[NR-1-i][NR-1-j] : 0;
      end
    do_trsm(l, id, linv);
    do_trsm(ur, id, xr);
    for (int i = 0; i < NR; i++) for (int j = 0; j < NR; j++) uinv[i][j] = xr[NR-1-i][NR-1-j];
    load_rowrep(uinv);
    load_panel(R_BVAL, linv);
    load_panel(R_CVAL, z);
    run(OP_GEMM, 3'd0);
    store(R_CVAL, ainv);
    n_gemm++;
    for (int i = 0; i < NR; i++)
      for (int j = 0; j < NR; j++) begin
        s = 0.0;
        for (int k = 0; k < NR; k++) s += tor(a[i][k]) * tor(ainv[k][j]);
        check(close(id[i][j], s, 0.01), $sformatf("A * inv(A) at [%0d][%0d] = %f", i, j, s));
      end
    n_inv++;
  endtask

  // Block update: C (4x4) += A (4 x 4P) * B (4P x 4). The P panels of B are
  // parked in the PEs' local memories first; each panel update then reads
  // its B panel back from local memory while the matching A panel streams in
  // over the row buses, and C stays in the PE registers throughout.
  task automatic test_block_gemm();
    localparam int P = 3;
    int a [NR][NR*P], b [NR*P][NR], c [NR][NR], e [NR][NR], q [NR][NR];
    int t [NR][NR];
    for (int i = 0; i < NR; i++) for (int k = 0; k < NR*P; k++) a[i][k] = rnd(2);
    for (int k = 0; k < NR*P; k++) for (int j = 0; j < NR; j++) b[k][j] = rnd(2);
    for (int i = 0; i < NR; i++) for (int j = 0; j < NR; j++) begin
      c[i][j] = rnd(2);
      e[i][j] = c[i][j];
      for (int k = 0; k < NR*P; k++) e[i][j] += fxmul(a[i][k], b[k][j]);
    end
    for (int p = 0; p < P; p++) begin
      for (int k = 0; k < NR; k++) for (int j = 0; j < NR; j++) t[k][j] = b[p*NR+k][j];
      load_panel(R_BVAL, t);
      run(OP_LM_WRITE, R_BVAL, 1'b0, 8'(16 + p));
    end
    load_panel(R_CVAL, c);
    for (int p = 0; p < P; p++) begin
      run(OP_LM_READ, R_BVAL, 1'b0, 8'(16 + p));
      for (int i = 0; i < NR; i++) for (int k = 0; k < NR; k++) t[i][k] = a[i][p*NR+k];
      load_rowrep(t);
      run(OP_GEMM, 3'd0);
      n_gemm++;
    end
    store(R_CVAL, q);
    for (int i = 0; i < NR; i++) for (int j = 0; j < NR; j++)
      check(q[i][j] == e[i][j], $sformatf("block GEMM C[%0d][%0d] %0d != %0d", i, j, q[i][j], e[i][j]));
    n_blk++;
  endtask

  // Back-pressure: a STORE is offered while a GEMM is still running.
  task automatic test_backpressure();
    int q [NR][NR];
    int bp0;
    bp0 = n_bp;
    run(OP_GEMM, 3'd0, 1'b1);
    store(R_CVAL, q);
    n_gemm++;
    check(n_bp == bp0 + 1, "instruction held off while busy");
  endtask

  initial begin
    rst_n       = 1'b0;
    instr_valid = 1'b0;
    instr       = '{op: OP_NOP, rsel: '0, addr: '0};
    for (int i = 0; i < NR; i++) for (int j = 0; j < NR; j++) ld[i][j] = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int t = 0; t < 3; t++) begin
      test_gemm(OP_GEMM);
      test_dense_gemv();
      test_trsm();
      test_lud();
    end
    test_gemm(OP_SPMM);
    test_spmv();
    test_spmm();
    test_inv();
    test_block_gemm();
    test_backpressure();
    $display("mechanisms: gemm=%0d gemv=%0d spmv=%0d spmm=%0d trsm=%0d lud=%0d inv=%0d load_panel=%0d load_rowrep=%0d store=%0d lm_read=%0d lm_write=%0d block_update=%0d backpressure=%0d",
             n_gemm, n_gemv, n_spmv, n_spmm, n_trsm, n_lud, n_inv, n_loadp, n_loadr, n_store, n_lmr, n_lmw, n_blk, n_bp);
    foreach (act_sum[op])
      $display("PE utilisation %-12s %0d PE-cycles in %0d cycles = %0.3f", op.name(), act_sum[op], act_cyc[op],
               real'(act_sum[op]) / (act_cyc[op] * NR * NR));
    foreach (act_sum[op])
      if (op inside {OP_GEMM, OP_GEMV, OP_SPMV, OP_SPMM})
        check(act_sum[op] == act_cyc[op] * NR * NR, $sformatf("%s utilisation is 1", op.name()));
    check(act_sum[OP_TRSM] * 3 * NR == act_cyc[OP_TRSM] * (2 + NR) * NR * NR, "TRSM utilisation is (2+NR)/(3NR)");
    check(n_gemm > 0 && n_gemv > 0 && n_spmv > 0 && n_spmm > 0 && n_trsm > 0 && n_lud > 0 &&
          n_inv > 0 && n_loadp > 0 && n_loadr > 0 && n_store > 0 && n_bp > 0 &&
          n_lmr > 0 && n_lmw > 0 && n_blk > 0, "every mechanism exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
