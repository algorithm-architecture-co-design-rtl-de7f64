// tb_recip_unit: checks the reciprocal unit on exact powers of two, on zero
// (saturation), and on random operands through the defining property
// |r*a - 2^32| < |a| (r is 1/a in Q16.16, rounded toward zero).
// The reciprocal follows the described diagonal-PE function; the
// saturation rules checked here are this design's choice.
module tb_recip_unit;
  import tb_fx_pkg::*;

  logic signed [31:0] a, r;
  int checks = 0, failures = 0;

  recip_unit #(.DATA_W(32), .FRAC_W(16)) dut (.a, .r);

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
    longint p, err, mag;
    a = 32'sd65536;  #1 check(r == 32'sd65536,  "1/1.0");
    a = 32'sd131072; #1 check(r == 32'sd32768,  "1/2.0");
    a = 32'sd32768;  #1 check(r == 32'sd131072, "1/0.5");
    a = -32'sd262144; #1 check(r == -32'sd16384, "1/-4.0");
    a = 32'sd196608; #1 check(r == 32'sd21845,  "1/3.0");
    a = 0;           #1 check(r == 32'sh7fff_ffff, "1/0 saturates");
    a = 32'sd1;      #1 check(r == 32'sh7fff_ffff, "1/2^-16 saturates");
    for (int t = 0; t < 500; t++) begin
      a = rnd(8);
      if (a == 0) a = 1 << 16;
      if (a > -256 && a < 256) a = a * 4096;
      #1;
      p   = longint'(r) * longint'(a);
      err = p - (longint'(1) <<< 32);
      if (err < 0) err = -err;
      mag = (a < 0) ? -longint'(a) : longint'(a);
      check(err < mag, $sformatf("1/%0d gave %0d", a, r));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
