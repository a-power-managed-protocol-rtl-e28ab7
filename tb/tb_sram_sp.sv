// tb_sram_sp: the 64 kB RAM at full size. Writes a computed pattern to all
// 65536 addresses, reads it back checking the one-cycle read latency, then
// checks that rdata holds while en is low and that a write does not change
// rdata.
module tb_sram_sp;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic        en = 0, we = 0;
  logic [15:0] addr = 0;
  logic [7:0]  wdata = 0, rdata;

  sram_sp dut (.clk, .en, .we, .addr, .wdata, .rdata);

  function automatic logic [7:0] pat(int a); return 8'((a * 37) ^ (a >> 8)); endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin : watchdog
    repeat (300000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < 65536; a++) begin
      @(negedge clk); en = 1; we = 1; addr = 16'(a); wdata = pat(a);
    end
    for (int a = 0; a < 65536; a++) begin
      @(negedge clk); en = 1; we = 0; addr = 16'(a);
      @(posedge clk); #1;
      check(rdata == pat(a), $sformatf("addr %h", a));
    end
    // hold while disabled
    @(negedge clk); en = 0; addr = 16'h1234;
    repeat (3) @(posedge clk); #1;
    check(rdata == pat(65535), "rdata held while en low");
    // write does not disturb rdata, and is visible on the next read
    @(negedge clk); en = 1; we = 1; addr = 16'h0042; wdata = 8'hA5;
    @(posedge clk); #1;
    check(rdata == pat(65535), "rdata unchanged by a write");
    @(negedge clk); we = 0;
    @(posedge clk); #1;
    check(rdata == 8'hA5, "written value read back");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
