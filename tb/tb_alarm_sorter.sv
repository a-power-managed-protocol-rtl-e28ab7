// tb_alarm_sorter: random alarm sets compared against a reference search for
// the smallest signed distance alarm_time - now (lowest index on ties), plus
// directed cases for an overdue alarm, a wrap of the time wheel and no alarm.
module tb_alarm_sorter;
  localparam int N = 8;
  logic [N-1:0]        valid;
  logic [N-1:0][23:0]  alarm_time;
  logic [23:0]         now;
  logic                sel_valid;
  logic [2:0]          sel_idx;
  int checks = 0, failures = 0;

  alarm_sorter dut (.valid, .alarm_time, .now, .sel_valid, .sel_idx);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic compare();
    int best; int bd; int d; bit any;
    any = 0; best = 0; bd = 0;
    for (int i = 0; i < N; i++) begin
      d = int'(alarm_time[i]) - int'(now);
      if (d >= (1 << 23)) d -= (1 << 24);
      if (d < -(1 << 23)) d += (1 << 24);
      if (valid[i] && (!any || d < bd)) begin any = 1; best = i; bd = d; end
    end
    #1;
    check(sel_valid == any, "sel_valid");
    if (any) check(sel_idx == 3'(best), $sformatf("sel_idx %0d expected %0d", sel_idx, best));
  endtask

  initial begin : watchdog
    #1000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // no alarm
    valid = '0; alarm_time = '0; now = 24'd100; compare();
    // directed: overdue alarm beats a future one
    valid = 8'b0000_0110; alarm_time[1] = 24'd150; alarm_time[2] = 24'd90; compare();
    check(sel_idx == 2, "overdue first");
    // directed: across the wrap, 0x000005 is sooner than 0x000100 when now = 0xFFFFF0
    now = 24'hFF_FFF0; valid = 8'b1001_0000; alarm_time[4] = 24'h000100; alarm_time[7] = 24'h000005; compare();
    check(sel_idx == 7, "wrap");
    // directed: tie goes to the lowest index
    valid = 8'b0010_1000; alarm_time[3] = 24'h10; alarm_time[5] = 24'h10; compare();
    check(sel_idx == 3, "tie");
    for (int t = 0; t < 2000; t++) begin
      valid = 8'($urandom);
      now = 24'($urandom);
      for (int i = 0; i < N; i++)
        alarm_time[i] = (t % 3 == 0) ? now + 24'($urandom_range(0, 40)) - 24'd10 : 24'($urandom);
      compare();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
