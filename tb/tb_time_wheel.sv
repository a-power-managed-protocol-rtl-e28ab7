// tb_time_wheel: checks the system time wheel.
// Instance A runs at the default 8 MHz / 100 = 80 kHz divider and 24-bit
// width: `tick` must come exactly every 100 main-clock cycles and `now` must
// equal the number of ticks seen. Instance B (divider 3, 4 bits) checks that
// the counter wraps. Reference values are counted in the testbench.
module tb_time_wheel;
  logic clk = 1'b0, rst_n = 1'b0;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  logic        tick_a, tick_b;
  logic [23:0] now_a;
  logic [3:0]  now_b;

  time_wheel dut_a (.clk, .rst_n, .tick(tick_a), .now(now_a));
  time_wheel #(.DIV(3), .WIDTH(4)) dut_b (.clk, .rst_n, .tick(tick_b), .now(now_b));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cyc, last_tick, ticks_a, ticks_b;
    cyc = 0; last_tick = -1; ticks_a = 0; ticks_b = 0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;   // released between edges; div counter is 1 at the next negedge
    check(now_a == 0 && now_b == 0, "reset value");
    repeat (1000) begin
      @(negedge clk);
      if (tick_a) begin
        if (last_tick >= 0) check(cyc - last_tick == 100, $sformatf("tick period %0d", cyc - last_tick));
        else check(cyc == 98, $sformatf("first tick at %0d", cyc));
        last_tick = cyc;
      end
      @(posedge clk);
      if (tick_a) ticks_a++;
      if (tick_b) ticks_b++;
      cyc++;
      #1;
      check(now_a == 24'(ticks_a), "now_a counts ticks");
      check(now_b == 4'(ticks_b), $sformatf("now_b wraps: %0d vs %0d", now_b, ticks_b));
    end
    check(ticks_a == 10, $sformatf("ticks in 1000 cycles: %0d", ticks_a));
    check(ticks_b == 333, "instance B tick count");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
