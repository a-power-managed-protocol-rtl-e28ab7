// tb_power_manager: checks the power manager at its default parameters
// (8 domains, 4 ports each, 24-bit time wheel at main clock / 100).
//
// Part 1, random: PIF open/close/can_sleep messages and configuration writes
// (port table, can_sleep bits, power-control enable) are applied every cycle
// and compared with a reference model of the reactive policy kept in this
// testbench: a request sampled at an edge must change `pd_awake`, the port
// state and the peer-open state at that same edge (one-cycle activation), a
// request from a sleeping domain must be refused, and everything must be
// awake while power control is disabled.
// Part 2, directed: virtual alarms. An alarm set for k ticks must pulse the
// domain's alarm line and wake it no earlier than the tick that reaches the
// alarm time and at most 2 cycles after it; alarms fire in time order; a
// cancelled alarm never fires; two alarms for the same tick both fire.
module tb_power_manager;
  import charm_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  pif_req_t [NUM_PD-1:0] pif_req;
  pif_rsp_t [NUM_PD-1:0] pif_rsp;
  logic [NUM_PD-1:0]     pd_awake;
  logic                  cfg_we;
  logic [7:0]            cfg_addr;
  logic [31:0]           cfg_wdata, cfg_rdata;
  logic                  timer_tick;
  logic [TIME_W-1:0]     now;

  power_manager dut (.clk, .rst_n, .pif_req, .pif_rsp, .pd_awake, .cfg_we,
    .cfg_addr, .cfg_wdata, .cfg_rdata, .timer_tick, .now);

  // ------------------------------------------------------------ reference
  bit  r_open [NUM_PD][NUM_PORTS];
  bit  r_peer [NUM_PD][NUM_PORTS];
  bit  r_cs   [NUM_PD];
  bit  r_awake[NUM_PD];
  bit  r_en;
  bit  r_cv   [NUM_PD*NUM_PORTS];
  int  r_cpd  [NUM_PD*NUM_PORTS];
  int  r_cport[NUM_PD*NUM_PORTS];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic idle_inputs();
    pif_req  = '0;
    cfg_we   = 1'b0;
    cfg_addr = '0;
    cfg_wdata = '0;
  endtask

  // Apply the current inputs to the reference model (call before the edge).
  task automatic ref_step();
    bit take[NUM_PD];
    bit n_open[NUM_PD][NUM_PORTS];
    for (int i = 0; i < NUM_PD; i++) begin
      take[i] = pif_req[i].valid && r_awake[i];
      check(pif_rsp[i].ack == take[i], $sformatf("ack pd%0d", i));
    end
    if (cfg_we && cfg_addr == CFG_CAN_SLEEP)
      for (int i = 0; i < NUM_PD; i++) r_cs[i] = cfg_wdata[i];
    if (cfg_we && cfg_addr == CFG_CTRL) r_en = cfg_wdata[0];
    for (int i = 0; i < NUM_PD; i++) begin
      for (int p = 0; p < NUM_PORTS; p++) n_open[i][p] = r_open[i][p];
      if (take[i]) begin
        case (pif_req[i].op)
          PIF_OPEN:      n_open[i][pif_req[i].port] = 1;
          PIF_CLOSE:     n_open[i][pif_req[i].port] = 0;
          PIF_CAN_SLEEP: r_cs[i] = pif_req[i].arg[0];
          default: ;
        endcase
      end
    end
    r_open = n_open;
    for (int i = 0; i < NUM_PD; i++) for (int p = 0; p < NUM_PORTS; p++) r_peer[i][p] = 0;
    for (int k = 0; k < NUM_PD*NUM_PORTS; k++)
      if (r_cv[k] && r_open[k / NUM_PORTS][k % NUM_PORTS]) r_peer[r_cpd[k]][r_cport[k]] = 1;
    for (int i = 0; i < NUM_PD; i++) begin
      bit any;
      any = !r_en || !r_cs[i];
      for (int p = 0; p < NUM_PORTS; p++) any |= r_open[i][p] | r_peer[i][p];
      r_awake[i] = any;
    end
    if (cfg_we && cfg_addr < NUM_PD*NUM_PORTS) begin
      r_cv[cfg_addr]    = cfg_wdata[5];
      r_cpd[cfg_addr]   = int'(cfg_wdata[4:2]);
      r_cport[cfg_addr] = int'(cfg_wdata[1:0]);
    end
  endtask

  task automatic ref_compare();
    for (int i = 0; i < NUM_PD; i++) begin
      check(pd_awake[i] == r_awake[i], $sformatf("awake pd%0d dut=%0b ref=%0b", i, pd_awake[i], r_awake[i]));
      check(pif_rsp[i].awake == r_awake[i], "rsp.awake");
      for (int p = 0; p < NUM_PORTS; p++) begin
        check(pif_rsp[i].port_open[p] == r_open[i][p], $sformatf("port_open %0d.%0d", i, p));
        check(pif_rsp[i].peer_open[p] == r_peer[i][p], $sformatf("peer_open %0d.%0d", i, p));
      end
    end
  endtask

  // One clock with the given inputs, model in lockstep.
  task automatic cycle();
    #1 ref_step();
    @(posedge clk); #1;
    ref_compare();
    @(negedge clk);
  endtask

  task automatic cfg_write(input logic [7:0] a, input logic [31:0] d);
    idle_inputs(); cfg_we = 1; cfg_addr = a; cfg_wdata = d;
    cycle();
    idle_inputs();
  endtask

  task automatic pif(input int pd, input pif_op_e op, input int port, input int arg);
    idle_inputs();
    pif_req[pd].valid = 1; pif_req[pd].op = op;
    pif_req[pd].port = PORT_W'(port); pif_req[pd].arg = TIME_W'(arg);
    cycle();
    idle_inputs();
  endtask

  // Alarms clear can_sleep inside the DUT; copy that state into the model.
  task automatic resync();
    cfg_addr = CFG_CAN_SLEEP; #1;
    for (int i = 0; i < NUM_PD; i++) begin
      r_cs[i] = cfg_rdata[i];
      r_awake[i] = pd_awake[i];
    end
    cfg_addr = '0;
  endtask

  int wakes = 0, sleeps = 0;
  logic [NUM_PD-1:0] prev_awake;

  // Wait for an alarm pulse on `pd`, at most `limit` cycles; return the time
  // wheel value seen with the pulse (or -1).
  task automatic wait_alarm(input int pd, input int limit, output int t_seen);
    t_seen = -1;
    for (int c = 0; c < limit; c++) begin
      @(posedge clk); #1;
      if (pif_rsp[pd].alarm) begin t_seen = int'(now); break; end
    end
  endtask

  initial begin
    int t0, ts, ts2;
    idle_inputs();
    for (int i = 0; i < NUM_PD; i++) begin
      r_cs[i] = 0; r_awake[i] = 1;
      for (int p = 0; p < NUM_PORTS; p++) begin r_open[i][p] = 0; r_peer[i][p] = 0; end
    end
    for (int k = 0; k < NUM_PD*NUM_PORTS; k++) begin r_cv[k] = 0; r_cpd[k] = 0; r_cport[k] = 0; end
    r_en = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    @(negedge clk);
    check(pd_awake == '1, "all awake after reset");

    // ---- directed: enable power control, everyone may sleep -> all asleep in one cycle
    cfg_write(CFG_CTRL, 1);
    cfg_write(CFG_CAN_SLEEP, 32'hFF);
    check(pd_awake == '0, "all asleep one cycle after can_sleep set");
    // a sleeping domain's request is refused
    pif(3, PIF_OPEN, 0, 0);
    check(pd_awake[3] == 0, "sleeping domain cannot open a port");
    // connection dw8051.0 -> queues.0 ; wake dw8051 via can_sleep clear
    cfg_write(8'(PD_DW8051*NUM_PORTS + 0), {26'd0, 1'b1, 3'(PD_QUEUES), 2'd0});
    cfg_write(CFG_CAN_SLEEP, 32'hFF & ~(32'd1 << PD_DW8051));
    check(pd_awake == (8'd1 << PD_DW8051), "only dw8051 awake");
    pif(PD_DW8051, PIF_OPEN, 0, 0);
    check(pd_awake[PD_QUEUES] && pif_rsp[PD_QUEUES].peer_open[0], "queues woken by connected port");
    pif(PD_DW8051, PIF_CLOSE, 0, 0);
    check(!pd_awake[PD_QUEUES], "queues asleep after port closed");
    // readback
    cfg_addr = CFG_CAN_SLEEP; #1;
    check(cfg_rdata[7:0] == (8'hFF & ~(8'd1 << PD_DW8051)), "can_sleep readback");
    cfg_addr = 8'(PD_DW8051*NUM_PORTS); #1;
    check(cfg_rdata[5:0] == {1'b1, 3'(PD_QUEUES), 2'd0}, "conn readback");
    idle_inputs();

    // ---- random traffic against the reference
    for (int t = 0; t < 4000; t++) begin
      idle_inputs();
      for (int i = 0; i < NUM_PD; i++) begin
        if ($urandom_range(0, 3) == 0) begin
          pif_req[i].valid = 1;
          case ($urandom_range(0, 3))
            0: pif_req[i].op = PIF_OPEN;
            1: pif_req[i].op = PIF_CLOSE;
            2: pif_req[i].op = PIF_CAN_SLEEP;
            default: pif_req[i].op = PIF_NOP;
          endcase
          pif_req[i].port = PORT_W'($urandom);
          pif_req[i].arg  = TIME_W'($urandom);
        end
      end
      if ($urandom_range(0, 7) == 0) begin
        cfg_we = 1;
        case ($urandom_range(0, 5))
          0: begin cfg_addr = CFG_CTRL; cfg_wdata = ($urandom_range(0, 5) != 0); end
          1, 2: begin cfg_addr = CFG_CAN_SLEEP; cfg_wdata = $urandom; end
          default: begin cfg_addr = 8'($urandom_range(0, 31)); cfg_wdata = $urandom; end
        endcase
      end
      prev_awake = pd_awake;
      cycle();
      wakes  += $countones(pd_awake & ~prev_awake);
      sleeps += $countones(~pd_awake & prev_awake);
    end
    check(wakes > 50 && sleeps > 50, $sformatf("random traffic wakes=%0d sleeps=%0d", wakes, sleeps));

    // ---- directed alarms
    idle_inputs();
    cfg_write(CFG_CTRL, 1);
    for (int i = 0; i < NUM_PD; i++) begin
      pif(i, PIF_CLOSE, 0, 0); pif(i, PIF_CLOSE, 1, 0); pif(i, PIF_CLOSE, 2, 0); pif(i, PIF_CLOSE, 3, 0);
    end
    for (int k = 0; k < NUM_PD*NUM_PORTS; k++) cfg_write(8'(k), 0);
    cfg_write(CFG_CAN_SLEEP, 32'h00);   // all awake to arm alarms
    t0 = int'(now);
    pif(PD_DLL, PIF_SET_ALARM, 0, 5);
    pif(PD_BASEBAND, PIF_SET_ALARM, 0, 2);
    pif(PD_LOCATION, PIF_SET_ALARM, 0, 3);
    pif(PD_LOCATION, PIF_CLR_ALARM, 0, 0);
    pif(PD_IF, PIF_SET_ALARM, 0, 2);       // same time as baseband
    cfg_write(CFG_CAN_SLEEP, 32'hFF);
    check(pd_awake == '0, "all asleep with alarms pending");
    fork
      begin wait_alarm(PD_BASEBAND, 1000, ts); end
      begin wait_alarm(PD_IF, 1000, ts2); end
    join
    check(ts == t0 + 2, $sformatf("baseband alarm at %0d expected %0d", ts, t0 + 2));
    check(ts2 == t0 + 2, $sformatf("if alarm at %0d expected %0d", ts2, t0 + 2));
    check(pd_awake[PD_BASEBAND] && pd_awake[PD_IF] && !pd_awake[PD_DLL], "baseband and if woken, dll still asleep");
    wait_alarm(PD_DLL, 1000, ts);
    check(ts == t0 + 5, $sformatf("dll alarm at %0d expected %0d", ts, t0 + 5));
    check(pd_awake[PD_DLL], "dll woken by alarm");
    cfg_addr = CFG_CAN_SLEEP; #1;
    check(cfg_rdata[PD_DLL] == 0, "alarm cleared can_sleep");
    wait_alarm(PD_LOCATION, 600, ts);
    check(ts == -1 && !pd_awake[PD_LOCATION], "cancelled alarm never fires");

    // latency: the pulse comes within 2 cycles of the tick that reaches it
    @(negedge clk);
    resync();
    pif(PD_DLL, PIF_SET_ALARM, 0, 1);
    begin
      int c = 0;
      while (!timer_tick) begin @(posedge clk); #1; end
      @(posedge clk); #1;                        // tick edge: now reaches alarm
      while (!pif_rsp[PD_DLL].alarm && c < 10) begin @(posedge clk); #1; c++; end
      check(c <= 1, $sformatf("alarm latency %0d extra cycles", c));
    end

    $display("random wakes=%0d sleeps=%0d", wakes, sleeps);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
