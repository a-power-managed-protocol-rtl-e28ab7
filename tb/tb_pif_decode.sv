// tb_pif_decode: drives every PIF message with and without the domain awake
// and checks the decoded updates against expected values.
module tb_pif_decode;
  import charm_pkg::*;
  pif_req_t               req;
  logic                   awake;
  logic [TIME_W-1:0]      now;
  logic                   ack, alarm_set, alarm_clr, cs_wr, cs_val;
  logic [NUM_PORTS-1:0]   open_set, open_clr;
  logic [TIME_W-1:0]      alarm_time;
  int checks = 0, failures = 0;

  pif_decode dut (.req, .awake, .now, .ack, .open_set, .open_clr, .alarm_set,
                  .alarm_clr, .alarm_time, .cs_wr, .cs_val);

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
    pif_op_e op;
    bit      take;
    for (int t = 0; t < 600; t++) begin
      op        = pif_op_e'(t % 6);
      req.valid = 1'($urandom);
      req.op    = op;
      req.port  = PORT_W'($urandom);
      req.arg   = TIME_W'($urandom);
      awake     = 1'($urandom);
      now       = TIME_W'($urandom);
      #1;
      take = req.valid && awake;
      check(ack == take, "ack");
      check(open_set == ((take && op == PIF_OPEN)  ? NUM_PORTS'(1) << req.port : '0), "open_set");
      check(open_clr == ((take && op == PIF_CLOSE) ? NUM_PORTS'(1) << req.port : '0), "open_clr");
      check(alarm_set == (take && op == PIF_SET_ALARM), "alarm_set");
      check(alarm_clr == (take && op == PIF_CLR_ALARM), "alarm_clr");
      check(cs_wr == (take && op == PIF_CAN_SLEEP), "cs_wr");
      if (alarm_set) check(alarm_time == TIME_W'(now + req.arg), "alarm_time = now + arg");
      if (cs_wr) check(cs_val == req.arg[0], "cs_val");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
