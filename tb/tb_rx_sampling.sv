// tb_rx_sampling: periodic channel sampling, the idle-listening pattern of
// the data-link layer, run on the full chip at default parameters.
//
// The DLL listens to the channel every 100 ms: at each wake-up it re-arms its
// alarm for 100 ms (8000 ticks of the 80 kHz time wheel) and opens its
// session to the baseband domain for a short listening window (LISTEN cycles,
// a value of this testbench). It then closes the session and goes back to
// sleep. Checked over PERIODS periods: every wake-up lands exactly 8000 ticks
// after the previous one; baseband is awake only while the DLL session is
// open; the other six domains never wake; and both DLL and baseband spend
// well under 1 % of the time awake. The measured duty cycles are printed.
module tb_rx_sampling;
  import charm_pkg::*;
  localparam int PERIOD_TICKS = 8000;   // 100 ms at 80 kHz
  localparam int PERIODS      = 4;
  localparam int LISTEN       = 40;

  logic clk = 1'b0, rst_n = 1'b0;
  always #62.5 clk = ~clk;
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

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  initial begin : watchdog
    repeat ((PERIODS + 2) * PERIOD_TICKS * TIMER_DIV) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic cfg_write(input logic [7:0] a, input logic [31:0] d);
    @(negedge clk); cfg_we = 1; cfg_addr = a; cfg_wdata = d;
    @(negedge clk); cfg_we = 0;
  endtask

  task automatic pif(input pd_id_e pd, input pif_op_e op, input int port, input int arg);
    @(negedge clk);
    pif_req[pd].valid = 1; pif_req[pd].op = op;
    pif_req[pd].port = PORT_W'(port); pif_req[pd].arg = TIME_W'(arg);
    @(posedge clk); #1;
    pif_req[pd] = '0;
  endtask

  // Activity monitor, active from the start of the measured periods.
  bit     measuring = 0, session = 0;
  longint cyc_total = 0, cyc_dll = 0, cyc_bb = 0;
  int     bad_bb = 0, bad_other = 0;
  always @(posedge clk) if (measuring) begin
    cyc_total++;
    if (pd_awake[PD_DLL]) cyc_dll++;
    if (pd_awake[PD_BASEBAND]) cyc_bb++;
    if (pd_awake[PD_BASEBAND] && !pif_rsp[PD_DLL].port_open[0]) bad_bb++;
    if (pd_awake & ~((8'd1 << PD_DLL) | (8'd1 << PD_BASEBAND))) bad_other++;
  end

  initial begin
    int t_prev, t_wake, n;
    real duty_dll, duty_bb;
    pif_req = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    cfg_write(8'(PD_DLL*NUM_PORTS + 0), {26'd0, 1'b1, 3'(PD_BASEBAND), 2'd0});
    cfg_write(CFG_CAN_SLEEP, 32'hFF & ~(32'd1 << PD_DLL));
    cfg_write(CFG_CTRL, 1);
    // first arm
    t_prev = int'(now);
    pif(PD_DLL, PIF_SET_ALARM, 0, PERIOD_TICKS);
    pif(PD_DLL, PIF_CAN_SLEEP, 0, 1);
    measuring = 1;
    for (int k = 0; k < PERIODS; k++) begin
      n = 0;
      while (!pif_rsp[PD_DLL].alarm) begin @(posedge clk); #1; end
      t_wake = int'(now);
      check(t_wake - t_prev == PERIOD_TICKS, $sformatf("period %0d: %0d ticks", k, t_wake - t_prev));
      check(pd_awake[PD_DLL] && !pd_awake[PD_BASEBAND], "dll woken alone");
      t_prev = t_wake;
      pif(PD_DLL, PIF_SET_ALARM, 0, PERIOD_TICKS);
      pif(PD_DLL, PIF_OPEN, 0, 0);
      check(pd_awake[PD_BASEBAND] && pd_vvdd[PD_BASEBAND] == 1.0, "baseband listening");
      repeat (LISTEN) @(posedge clk);
      pif(PD_DLL, PIF_CLOSE, 0, 0);
      check(!pd_awake[PD_BASEBAND], "baseband back to sleep");
      pif(PD_DLL, PIF_CAN_SLEEP, 0, 1);
      check(!pd_awake[PD_DLL] && pd_vvdd[PD_DLL] == 0.3, "dll back to sleep");
    end
    measuring = 0;
    duty_dll = real'(cyc_dll) / real'(cyc_total);
    duty_bb  = real'(cyc_bb) / real'(cyc_total);
    check(bad_bb == 0, "baseband awake only during the session");
    check(bad_other == 0, "other domains stay asleep");
    check(duty_dll < 0.01 && duty_bb < 0.01 && cyc_bb > 0, "low duty cycle");
    $display("cycles=%0d dll awake=%0d (%f %%) baseband awake=%0d (%f %%)",
             cyc_total, cyc_dll, 100.0 * duty_dll, cyc_bb, 100.0 * duty_bb);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
