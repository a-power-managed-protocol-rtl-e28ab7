// tb_packet_queue: a 1 kB queue at its default size against a testbench
// reference queue. Fills it to full (and checks that a further write is
// dropped), drains it to empty (and checks that a further read is ignored),
// then runs random simultaneous reads and writes. Read data is checked one
// cycle after the read, and `level` every cycle.
module tb_packet_queue;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic        wr_en = 0, rd_en = 0, full, empty;
  logic [7:0]  wr_data = 0, rd_data;
  logic [10:0] level;
  byte unsigned ref_q[$];

  packet_queue dut (.clk, .rst_n, .wr_en, .wr_data, .full, .rd_en, .rd_data, .empty, .level);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // One cycle: drive, clock, update the reference, check.
  task automatic step(input bit w, input bit r, input byte unsigned d);
    bit do_w, do_r; byte unsigned exp;
    @(negedge clk);
    wr_en = w; rd_en = r; wr_data = d;
    do_w = w && ref_q.size() < 1024;
    do_r = r && ref_q.size() > 0;
    check(full == (ref_q.size() == 1024), "full flag");
    check(empty == (ref_q.size() == 0), "empty flag");
    check(level == 11'(ref_q.size()), $sformatf("level %0d vs %0d", level, ref_q.size()));
    exp = 0;
    if (do_r) exp = ref_q.pop_front();
    if (do_w) ref_q.push_back(d);
    @(posedge clk); #1;
    if (do_r) check(rd_data == exp, $sformatf("rd_data %h expected %h", rd_data, exp));
  endtask

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int i = 0; i < 1025; i++) step(1, 0, 8'($urandom));
    check(full && level == 1024, "full after 1024 writes");
    for (int i = 0; i < 1025; i++) step(0, 1, 0);
    check(empty, "empty after draining");
    for (int i = 0; i < 6000; i++) step(1'($urandom), 1'($urandom), 8'($urandom));
    @(negedge clk); wr_en = 0; rd_en = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
