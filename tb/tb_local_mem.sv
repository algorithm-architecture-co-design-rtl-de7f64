// tb_local_mem: random single-port traffic against a shadow array; a read
// returns the word written last at that address one cycle later, and the
// read data holds while no new read is made.
// Depth and single port follow the described local memory; the read
// latency checked here is this design's choice.
module tb_local_mem;
  logic        clk = 1'b0, en, we;
  logic [7:0]  addr;
  logic [31:0] wdata, rdata;
  int checks = 0, failures = 0;
  logic [31:0] shadow [256];
  bit          valid [256];

  local_mem #(.DATA_W(32), .DEPTH(256)) dut (.clk, .en, .we, .addr, .wdata, .rdata);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] last;
    bit          have;
    en = 0; we = 0; addr = 0; wdata = 0; have = 0; last = 0;
    for (int i = 0; i < 256; i++) valid[i] = 0;
    // Fill every word once.
    for (int i = 0; i < 256; i++) begin
      @(negedge clk);
      en = 1; we = 1; addr = 8'(i); wdata = $urandom;
      shadow[i] = wdata; valid[i] = 1;
    end
    for (int t = 0; t < 4000; t++) begin
      @(negedge clk);
      if (have) check(rdata == last, $sformatf("read data %h want %h", rdata, last));
      en = 1'($urandom_range(3, 0) != 0);
      we = 1'($urandom_range(1, 0));
      addr = 8'($urandom);
      wdata = $urandom;
      @(posedge clk);
      if (en && we) shadow[addr] = wdata;
      else if (en) begin last = shadow[addr]; have = 1; end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
