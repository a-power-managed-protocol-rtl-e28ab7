// tb_power_switch: the virtual supply must follow vddhi when awake and vddlo
// when asleep, and the buffered control must equal the input. Run once with
// the default rails and once with an overridden retention voltage.
module tb_power_switch;
  logic awake;
  logic buf_a, buf_b;
  real  vv_a, vv_b;
  int checks = 0, failures = 0;

  power_switch dut_a (.awake, .awake_buf(buf_a), .vvdd(vv_a));
  power_switch #(.VDDHI(1.0), .VDDLO(0.5)) dut_b (.awake, .awake_buf(buf_b), .vvdd(vv_b));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin : watchdog
    #1000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 8; t++) begin
      awake = t[0];
      #1;
      check(buf_a == awake && buf_b == awake, "awake_buf follows awake");
      check(vv_a == (awake ? 1.0 : 0.3), $sformatf("default vvdd %f", vv_a));
      check(vv_b == (awake ? 1.0 : 0.5), $sformatf("override vvdd %f", vv_b));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
