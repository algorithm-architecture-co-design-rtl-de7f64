// tb_pe_regfile: random writes and reads against a shadow copy; checks both
// read ports, the destination read tap, reset to zero and that writes to
// addresses beyond the six registers are dropped.
// Port count follows the described register file; size and accumulator tap
// are this design's choice.
module tb_pe_regfile;
  logic        clk = 1'b0, rst_n;
  logic [2:0]  raddr1, raddr2, waddr;
  logic [31:0] rdata1, rdata2, wdata, wa_rdata;
  logic        we;
  int checks = 0, failures = 0;
  logic [31:0] shadow [6];

  pe_regfile #(.DATA_W(32), .DEPTH(6), .AW(3)) dut (
    .clk, .rst_n, .raddr1, .raddr2, .rdata1, .rdata2, .we, .waddr, .wdata, .wa_rdata);

  always #5 clk = ~clk;

  function automatic logic [31:0] sh(logic [2:0] a);
    return (a < 3'd6) ? shadow[a] : 32'd0;
  endfunction

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0; we = 1'b0; raddr1 = 0; raddr2 = 0; waddr = 0; wdata = 0;
    for (int i = 0; i < 6; i++) shadow[i] = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int i = 0; i < 6; i++) begin
      raddr1 = 3'(i); #1 check(rdata1 == 0, "reset value");
    end
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      raddr1 = 3'($urandom_range(7, 0));
      raddr2 = 3'($urandom_range(7, 0));
      waddr  = 3'($urandom_range(7, 0));
      wdata  = $urandom;
      we     = 1'($urandom_range(1, 0));
      #1;
      check(rdata1 == sh(raddr1), $sformatf("port 1 addr %0d", raddr1));
      check(rdata2 == sh(raddr2), $sformatf("port 2 addr %0d", raddr2));
      check(wa_rdata == sh(waddr), $sformatf("tap addr %0d", waddr));
      @(posedge clk);
      if (we && waddr < 3'd6) shadow[waddr] = wdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
