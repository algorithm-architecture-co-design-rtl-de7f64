// tb_pe_alu: drives random operands into an off-diagonal ALU and a diagonal
// ALU (with reciprocal unit) and compares each operation with the
// fixed-point reference arithmetic.
// MAC and reciprocal follow the described PE; the four-operation set and
// the fixed-point rounding are this design's choice.
module tb_pe_alu;
  import lac_pkg::*;
  import tb_fx_pkg::*;

  alu_op_e            op;
  logic               recip_sel;
  logic signed [31:0] rd1, rd2, cb, acc, res_n, res_d;
  int checks = 0, failures = 0;

  pe_alu #(.DATA_W(32), .FRAC_W(16), .HAS_RECIP(1'b0)) dut_n (
    .op, .recip_sel, .rd1, .rd2, .cb, .acc, .result(res_n));
  pe_alu #(.DATA_W(32), .FRAC_W(16), .HAS_RECIP(1'b1)) dut_d (
    .op, .recip_sel, .rd1, .rd2, .cb, .acc, .result(res_d));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int e, ed;
    for (int t = 0; t < 2000; t++) begin
      op        = alu_op_e'($urandom_range(3, 0));
      recip_sel = 1'($urandom_range(1, 0));
      rd1 = rnd(6); rd2 = rnd(6); cb = rnd(6); acc = rnd(10);
      #1;
      case (op)
        ALU_MOV:  begin e = rd1; ed = recip_sel ? fxrecip(rd1) : rd1; end
        ALU_MAC:  begin e = acc + fxmul(rd1, cb); ed = e; end
        ALU_MSUB: begin e = acc - fxmul(rd1, cb); ed = e; end
        default:  begin e = fxmul(rd1, rd2); ed = e; end
      endcase
      check(res_n == e,  $sformatf("%s off-diagonal rd1=%0d rd2=%0d cb=%0d acc=%0d -> %0d, want %0d", op.name(), rd1, rd2, cb, acc, res_n, e));
      check(res_d == ed, $sformatf("%s diagonal sel=%0d rd1=%0d -> %0d, want %0d", op.name(), recip_sel, rd1, res_d, ed));
    end
    // A worked case: 1.5 * 2.25 = 3.375 added to 1.0.
    op = ALU_MAC; rd1 = 32'sd98304; cb = 32'sd147456; acc = 32'sd65536; #1;
    check(res_n == 32'sd286720, "1 + 1.5*2.25 = 4.375");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
