// tb_charm_top: end-to-end run of the power-managed processor at its default
// parameters (8 MHz main clock, 80 kHz time wheel, 1 kB queues, 64 kB RAM).
//
// The testbench plays the protocol subsystems that sit outside the top and
// walks through the transmission of one broadcast packet:
//   1. after reset power control is off and every domain is awake;
//   2. the microcontroller loads code into its RAM, programs the port table
//      (dw8051.0 -> queues.0, dll.0 -> baseband.0, dll.1 -> queues.1) and
//      enables power control: idle domains drop to the retention voltage;
//   3. the DLL arms an alarm and sleeps; a write into the TX queue without an
//      open port is blocked by the signal wall, and a PIF request from a
//      sleeping domain has no effect;
//   4. the network layer opens its queue port (the queues domain wakes in one
//      cycle), writes a 64-byte packet and closes it (the queues sleep and
//      keep the data);
//   5. the DLL alarm expires at the programmed tick and wakes the DLL, which
//      opens its baseband and queue ports (both wake), reads the packet back
//      in order, writes a received acknowledgement into the RX queue, closes
//      the ports and re-arms its periodic RX-sampling alarm, which wakes it
//      again;
//   6. the network layer reads the RX bytes; power control is switched off and
//      on again.
// Every mechanism (sleep, wake through a connected port, wake by alarm, wall
// blocking, refused PIF, retention across sleep, power-control disable) is
// counted and each must have happened at least once.
module tb_charm_top;
  import charm_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #62.5 clk = ~clk;   // 8 MHz
  int checks = 0, failures = 0;

  pif_req_t [NUM_PD-1:0] pif_req;
  pif_rsp_t [NUM_PD-1:0] pif_rsp;
  logic [NUM_PD-1:0]     pd_awake;
  real                   pd_vvdd [NUM_PD];
  logic                  cfg_we = 0;
  logic [7:0]            cfg_addr = 0;
  logic [31:0]           cfg_wdata = 0, cfg_rdata;
  logic                  timer_tick;
  logic [TIME_W-1:0]     now;
  logic                  mem_en = 0, mem_we = 0;
  logic [15:0]           mem_addr = 0;
  logic [7:0]            mem_wdata = 0, mem_rdata;
  logic                  net_tx_wr = 0, net_rx_rd = 0, dll_tx_rd = 0, dll_rx_wr = 0;
  logic [7:0]            net_tx_data = 0, dll_rx_data = 0;
  logic                  net_tx_full, net_rx_empty, dll_tx_empty, dll_rx_full;
  logic [7:0]            net_rx_data, dll_tx_data;

  charm_top dut (.*);

  // mechanism counters
  int n_sleep = 0, n_wake_port = 0, n_wake_alarm = 0, n_wall_block = 0;
  int n_pif_refused = 0, n_retained = 0, n_pm_off = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic cfg_write(input logic [7:0] a, input logic [31:0] d);
    @(negedge clk); cfg_we = 1; cfg_addr = a; cfg_wdata = d;
    @(negedge clk); cfg_we = 0;
  endtask

  // Issue one PIF message; returns with the request sampled by one edge.
  task automatic pif(input pd_id_e pd, input pif_op_e op, input int port, input int arg);
    @(negedge clk);
    pif_req[pd].valid = 1; pif_req[pd].op = op;
    pif_req[pd].port = PORT_W'(port); pif_req[pd].arg = TIME_W'(arg);
    @(posedge clk); #1;
    pif_req[pd] = '0;
  endtask

  function automatic logic [7:0] pkt(int i); return 8'(8'hB0 ^ (i * 29)); endfunction

  function automatic bit asleep_ok(int pd);
    return !pd_awake[pd] && pd_vvdd[pd] == 0.3;
  endfunction

  initial begin
    int t_arm, t_seen, n;
    pif_req = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;

    // 1. reset state: power control off, all awake at vddhi
    @(negedge clk);
    check(pd_awake == '1, "all domains awake after reset");
    for (int i = 0; i < NUM_PD; i++) check(pd_vvdd[i] == 1.0, "vddhi after reset");
    n_pm_off++;

    // 2. microcontroller: load a few RAM bytes and read them back
    for (int a = 0; a < 256; a++) begin
      @(negedge clk); mem_en = 1; mem_we = 1; mem_addr = 16'(a * 251); mem_wdata = 8'(a ^ 8'h5A);
    end
    for (int a = 0; a < 256; a++) begin
      @(negedge clk); mem_en = 1; mem_we = 0; mem_addr = 16'(a * 251);
      @(posedge clk); #1;
      check(mem_rdata == 8'(a ^ 8'h5A), "RAM read back");
    end
    @(negedge clk); mem_en = 0;

    // program port table and policy
    cfg_write(8'(PD_DW8051*NUM_PORTS + 0), {26'd0, 1'b1, 3'(PD_QUEUES),   2'd0});
    cfg_write(8'(PD_DLL*NUM_PORTS + 0),    {26'd0, 1'b1, 3'(PD_BASEBAND), 2'd0});
    cfg_write(8'(PD_DLL*NUM_PORTS + 1),    {26'd0, 1'b1, 3'(PD_QUEUES),   2'd1});
    cfg_write(CFG_CAN_SLEEP, 32'hFF & ~((32'd1 << PD_DW8051) | (32'd1 << PD_DLL)));
    cfg_write(CFG_CTRL, 1);
    check(pd_awake == ((8'd1 << PD_DW8051) | (8'd1 << PD_DLL)), "only dw8051 and dll awake");
    for (int i = 0; i < NUM_PD; i++)
      if (i != PD_DW8051 && i != PD_DLL) begin
        check(asleep_ok(i), $sformatf("pd%0d at retention voltage", i));
        n_sleep++;
      end

    // 3. DLL arms its RX-sampling alarm (4 ticks) and goes to sleep
    t_arm = int'(now);
    pif(PD_DLL, PIF_SET_ALARM, 0, 4);
    pif(PD_DLL, PIF_CAN_SLEEP, 0, 1);
    check(asleep_ok(PD_DLL), "dll asleep one cycle after can_sleep");
    n_sleep++;
    // network layer writes without an open port: blocked by the wall
    @(negedge clk); net_tx_wr = 1; net_tx_data = 8'hEE;
    @(negedge clk); net_tx_wr = 0;
    check(net_tx_full == 0 && net_rx_empty == 0 && net_rx_data == 0, "walled outputs grounded");
    n_wall_block++;
    // a sleeping domain's request does not reach the manager
    pif(PD_SERIAL, PIF_OPEN, 0, 0);
    @(negedge clk);
    check(!pd_awake[PD_SERIAL] && pif_rsp[PD_SERIAL].port_open == 0, "sleeping serial domain cannot open a port");
    n_pif_refused++;

    // 4. network layer opens its queue port: queues wake within one cycle
    pif(PD_DW8051, PIF_OPEN, 0, 0);
    check(pd_awake[PD_QUEUES] && pd_vvdd[PD_QUEUES] == 1.0, "queues awake one cycle after port open");
    n_wake_port++;
    for (int i = 0; i < 64; i++) begin
      @(negedge clk); net_tx_wr = 1; net_tx_data = pkt(i);
    end
    @(negedge clk); net_tx_wr = 0;
    pif(PD_DW8051, PIF_CLOSE, 0, 0);
    check(asleep_ok(PD_QUEUES), "queues asleep after port closed");
    n_sleep++;
    pif(PD_DW8051, PIF_CAN_SLEEP, 0, 1);
    check(asleep_ok(PD_DW8051), "dw8051 asleep");
    n_sleep++;
    check(pd_awake == '0, "whole chip asleep while waiting for the alarm");

    // 5. DLL alarm
    n = 0;
    while (!pif_rsp[PD_DLL].alarm && n < 2000) begin @(posedge clk); #1; n++; end
    t_seen = int'(now);
    check(pif_rsp[PD_DLL].alarm && t_seen == t_arm + 4, $sformatf("dll alarm at tick %0d, armed %0d+4", t_seen, t_arm));
    check(pd_awake[PD_DLL] && pd_vvdd[PD_DLL] == 1.0, "dll woken by alarm");
    n_wake_alarm++;
    pif(PD_DLL, PIF_OPEN, 0, 0);
    check(pd_awake[PD_BASEBAND], "baseband awake through dll port 0");
    n_wake_port++;
    pif(PD_DLL, PIF_OPEN, 1, 0);
    check(pd_awake[PD_QUEUES], "queues awake through dll port 1");
    n_wake_port++;
    for (int i = 0; i < 64; i++) begin
      @(negedge clk);
      check(!dll_tx_empty, "tx not empty");
      dll_tx_rd = 1;
      @(posedge clk); #1;
      check(dll_tx_data == pkt(i), $sformatf("packet byte %0d retained across sleep", i));
    end
    @(negedge clk); dll_tx_rd = 0;
    check(dll_tx_empty, "blocked write never entered the queue");
    n_retained++;
    for (int i = 0; i < 8; i++) begin
      @(negedge clk); dll_rx_wr = 1; dll_rx_data = 8'(8'hA0 + i);
    end
    @(negedge clk); dll_rx_wr = 0;
    pif(PD_DLL, PIF_CLOSE, 0, 0);
    check(asleep_ok(PD_BASEBAND) && pd_awake[PD_QUEUES], "baseband asleep, queues still held by port 1");
    pif(PD_DLL, PIF_CLOSE, 1, 0);
    check(asleep_ok(PD_QUEUES), "queues asleep");
    t_arm = int'(now);
    pif(PD_DLL, PIF_SET_ALARM, 0, 2);
    pif(PD_DLL, PIF_CAN_SLEEP, 0, 1);
    check(asleep_ok(PD_DLL), "dll asleep until next sampling");
    n = 0;
    while (!pif_rsp[PD_DLL].alarm && n < 2000) begin @(posedge clk); #1; n++; end
    check(pd_awake[PD_DLL] && int'(now) == t_arm + 2, "periodic sampling alarm");
    n_wake_alarm++;
    pif(PD_DLL, PIF_CAN_SLEEP, 0, 1);

    // 6. network layer collects the RX bytes
    cfg_write(CFG_CAN_SLEEP, 32'hFF & ~(32'd1 << PD_DW8051));
    check(pd_awake[PD_DW8051], "dw8051 woken by configuration");
    pif(PD_DW8051, PIF_OPEN, 0, 0);
    n_wake_port++;
    for (int i = 0; i < 8; i++) begin
      @(negedge clk); net_rx_rd = 1;
      @(posedge clk); #1;
      check(net_rx_data == 8'(8'hA0 + i), $sformatf("rx byte %0d", i));
    end
    @(negedge clk); net_rx_rd = 0;
    check(net_rx_empty, "rx empty");
    pif(PD_DW8051, PIF_CLOSE, 0, 0);
    // power control off: everything wakes in one cycle; on again: sleeps
    cfg_write(CFG_CTRL, 0);
    check(pd_awake == '1, "power control disabled: all awake");
    n_pm_off++;
    cfg_write(CFG_CTRL, 1);
    check(pd_awake == (8'd1 << PD_DW8051), "power control enabled: only dw8051 awake");

    check(n_sleep > 0, "mechanism: sleep");
    check(n_wake_port > 0, "mechanism: wake through connected port");
    check(n_wake_alarm > 0, "mechanism: wake by alarm");
    check(n_wall_block > 0, "mechanism: signal wall blocks");
    check(n_pif_refused > 0, "mechanism: PIF of sleeping domain refused");
    check(n_retained > 0, "mechanism: queue state retained in sleep");
    check(n_pm_off > 0, "mechanism: power control disabled");
    $display("sleep=%0d wake_port=%0d wake_alarm=%0d wall=%0d pif_refused=%0d retained=%0d pm_off=%0d",
             n_sleep, n_wake_port, n_wake_alarm, n_wall_block, n_pif_refused, n_retained, n_pm_off);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
