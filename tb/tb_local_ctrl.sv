// tb_local_ctrl: checks the local controller's instruction handshake, the
// start strobe to the PEs, the busy length and done pulse of every
// instruction, and the in_rd / in_col and out_valid / out_col sequences of
// the transfer instructions. One instruction is offered while busy and must
// wait.
// The handshake and the transfer sequencing checked here are this design's
// own; the local controller's role is only outlined in the description.
module tb_local_ctrl;
  import lac_pkg::*;

  logic        clk = 1'b0, rst_n, instr_valid, instr_ready, pe_start, busy, done;
  logic        in_rd, out_valid;
  logic [1:0]  in_col, out_col;
  instr_t      instr_in, pe_instr;
  int checks = 0, failures = 0;

  local_ctrl #(.NR(4)) dut (.clk, .rst_n, .instr_valid, .instr_in, .instr_ready,
    .pe_start, .pe_instr, .busy, .done, .in_rd, .in_col, .out_valid, .out_col);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Issue, then record the cycles until done.
  task automatic issue(opcode_e op, int want_len);
    int len, n_in, n_out;
    @(negedge clk);
    instr_valid = 1'b1; instr_in = '{op: op, rsel: 3'd2, addr: '0};
    #1;
    check(instr_ready && pe_start && pe_instr.op == op, $sformatf("%s start strobe", op.name()));
    @(negedge clk);
    instr_valid = 1'b0;
    len = 0; n_in = 0; n_out = 0;
    do begin
      check(busy && !instr_ready && !pe_start, "busy while running");
      if (in_rd)     begin check(int'(in_col) == n_in, "in_col sequence"); n_in++; end
      if (out_valid) begin check(int'(out_col) == n_out, "out_col sequence"); n_out++; end
      len++;
      if (done) break;
      @(negedge clk);
    end while (len < 40);
    check(len == want_len, $sformatf("%s lasted %0d cycles, want %0d", op.name(), len, want_len));
    check(n_in == ((op == OP_LOAD_PANEL || op == OP_LOAD_ROWREP) ? 4 : 0), "input transfer count");
    check(n_out == ((op == OP_STORE_PANEL) ? 4 : 0), "output transfer count");
    @(negedge clk);
    check(!busy && instr_ready, "idle after done");
  endtask

  initial begin
    rst_n = 1'b0; instr_valid = 1'b0; instr_in = '{op: OP_NOP, rsel: '0, addr: '0};
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    issue(OP_LOAD_PANEL, 5);
    issue(OP_LOAD_ROWREP, 5);
    issue(OP_STORE_PANEL, 4);
    issue(OP_GEMM, 5);
    issue(OP_GEMV, 5);
    issue(OP_SPMV, 5);
    issue(OP_SPMM, 5);
    issue(OP_TRSM, 12);
    issue(OP_LUD, 15);
    issue(OP_LM_READ, 2);
    issue(OP_LM_WRITE, 1);
    // Back-pressure: a second instruction waits until the first is done.
    @(negedge clk);
    instr_valid = 1'b1; instr_in = '{op: OP_TRSM, rsel: 3'd0, addr: '0};
    @(negedge clk);
    instr_in = '{op: OP_GEMM, rsel: 3'd0, addr: '0};
    #1 check(!instr_ready && !pe_start, "held off while busy");
    for (int s = 0; s < 12; s++) @(negedge clk);
    #1 check(instr_ready && pe_start && pe_instr.op == OP_GEMM, "accepted right after done");
    @(negedge clk);
    instr_valid = 1'b0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
