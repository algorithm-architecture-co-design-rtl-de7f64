// tb_lac_gemm_k512: the GEMM block update that sizes the local memory, run
// on one core at its default parameters (4x4 PEs, 256 words per PE).
//
// The block update computes C' (n x k) += A (n x 2NR) * B (2NR x k) with
// k = 512, the point at which B fills the local memories exactly:
// 2NR * k = 4096 elements over 16 PEs is 256 words per PE. The testbench
// plays the on-chip memory. It first streams B in as 4x4 panels and parks
// panel (kp, c) at local-memory address kp*(k/NR) + c in every PE. It then
// walks C' panel by panel: load the C' panel, and for each of the two
// k-panels read the B panel back from local memory, stream the matching A
// panel in row-replicated and run a GEMM panel update; finally store the
// C' panel and compare it with a software model. n = 8 (two block rows)
// keeps the run short; more block rows repeat the same sequence.
//
// Checked: every C' element, the cycle count of every instruction, and that
// the whole local memory (addresses 0..255) was written and read back. The
// fraction of cycles spent in GEMM is printed as the measured core
// utilisation of this sequential (non-overlapped) schedule.
// k = 512 and the 256-word local memory are the described configuration;
// n = 8 and the instruction sequence are this testbench's choice.
module tb_lac_gemm_k512;
  import lac_pkg::*;
  import tb_fx_pkg::*;

  localparam int NR  = 4;
  localparam int K   = 512;
  localparam int N   = 8;
  localparam int KP  = 2;          // 2NR rows of B = two 4x4 k-panels
  localparam int NCB = K / NR;     // column blocks of B and C'

  logic        clk = 1'b0;
  logic        rst_n;
  logic        instr_valid;
  instr_t      instr;
  logic        instr_ready, done, in_rd, out_valid;
  logic [1:0]  in_col, out_col;
  logic [31:0] in_data  [NR];
  logic [31:0] out_data [NR];

  int checks = 0, failures = 0;
  int ld [NR][NR];
  int st [NR][NR];
  int cyc_total = 0, cyc_gemm = 0;
  int n_gemm = 0, n_lmr = 0, n_lmw = 0, n_panels = 0;
  bit lm_written [LM_DEPTH];
  bit lm_read    [LM_DEPTH];

  int a [N][KP*NR];
  int b [KP*NR][K];

  lac_core dut (
    .clk, .rst_n, .instr_valid, .instr, .instr_ready, .done,
    .in_rd, .in_col, .in_data, .out_valid, .out_col, .out_data
  );

  always #5 clk = ~clk;

  always_comb for (int i = 0; i < NR; i++) in_data[i] = ld[i][in_col];

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  function automatic int expected_cycles(opcode_e op);
    case (op)
      OP_STORE_PANEL: return NR;
      OP_LM_READ:     return 2;
      OP_LM_WRITE:    return 1;
      default:        return NR + 1;   // loads and GEMM
    endcase
  endfunction

  task automatic run(opcode_e op, logic [2:0] rsel, logic [7:0] addr = 8'h00);
    int cyc;
    @(negedge clk);
    instr_valid = 1'b1;
    instr       = '{op: op, rsel: rsel, addr: addr};
    while (!instr_ready) @(negedge clk);
    @(posedge clk);
    #1 instr_valid = 1'b0;
    cyc = 0;
    do begin
      @(negedge clk);
      cyc++;
      if (out_valid) for (int i = 0; i < NR; i++) st[i][out_col] = out_data[i];
    end while (!done);
    check(cyc == expected_cycles(op), $sformatf("%s took %0d cycles", op.name(), cyc));
    cyc_total += cyc;
    case (op)
      OP_GEMM:     begin cyc_gemm += cyc; n_gemm++; end
      OP_LM_READ:  begin n_lmr++; lm_read[addr] = 1'b1; end
      OP_LM_WRITE: begin n_lmw++; lm_written[addr] = 1'b1; end
      default: ;
    endcase
  endtask

  initial begin
    int t [NR][NR], c [NR][NR], e [NR][NR];
    int all_w, all_r;
    rst_n       = 1'b0;
    instr_valid = 1'b0;
    instr       = '{op: OP_NOP, rsel: '0, addr: '0};
    for (int i = 0; i < NR; i++) for (int j = 0; j < NR; j++) ld[i][j] = 0;
    for (int i = 0; i < LM_DEPTH; i++) begin lm_written[i] = 1'b0; lm_read[i] = 1'b0; end
    for (int i = 0; i < N; i++) for (int k = 0; k < KP*NR; k++) a[i][k] = rnd(2);
    for (int k = 0; k < KP*NR; k++) for (int j = 0; j < K; j++) b[k][j] = rnd(2);
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;

    // Park all of B in the local memories.
    for (int kp = 0; kp < KP; kp++)
      for (int cb = 0; cb < NCB; cb++) begin
        for (int i = 0; i < NR; i++) for (int j = 0; j < NR; j++) t[i][j] = b[kp*NR+i][cb*NR+j];
        ld = t;
        run(OP_LOAD_PANEL, R_BVAL);
        run(OP_LM_WRITE, R_BVAL, 8'(kp*NCB + cb));
      end

    // Walk C' panel by panel.
    for (int rb = 0; rb < N / NR; rb++)
      for (int cb = 0; cb < NCB; cb++) begin
        for (int i = 0; i < NR; i++) for (int j = 0; j < NR; j++) begin
          c[i][j] = rnd(2);
          e[i][j] = c[i][j];
          for (int k = 0; k < KP*NR; k++) e[i][j] += fxmul(a[rb*NR+i][k], b[k][cb*NR+j]);
        end
        ld = c;
        run(OP_LOAD_PANEL, R_CVAL);
        for (int kp = 0; kp < KP; kp++) begin
          run(OP_LM_READ, R_BVAL, 8'(kp*NCB + cb));
          for (int i = 0; i < NR; i++) for (int k = 0; k < NR; k++) t[i][k] = a[rb*NR+i][kp*NR+k];
          ld = t;
          run(OP_LOAD_ROWREP, 3'd0);
          run(OP_GEMM, 3'd0);
        end
        run(OP_STORE_PANEL, R_CVAL);
        for (int i = 0; i < NR; i++) for (int j = 0; j < NR; j++)
          check(st[i][j] == e[i][j], $sformatf("C'[%0d][%0d] %0d != %0d", rb*NR+i, cb*NR+j, st[i][j], e[i][j]));
        n_panels++;
      end

    all_w = 0; all_r = 0;
    for (int i = 0; i < LM_DEPTH; i++) begin all_w += lm_written[i]; all_r += lm_read[i]; end
    check(all_w == LM_DEPTH && all_r == LM_DEPTH, $sformatf("local memory coverage %0d/%0d written, %0d read", all_w, LM_DEPTH, all_r));
    check(n_gemm == KP * NCB * (N / NR) && n_panels == NCB * (N / NR), "panel update count");
    $display("k=%0d n=%0d: %0d GEMM panel updates, %0d LM writes, %0d LM reads, GEMM cycles %0d of %0d",
             K, N, n_gemm, n_lmw, n_lmr, cyc_gemm, cyc_total);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
