// power_manager: central power manager (PM) of the protocol processor.
//
// The chip is divided into NUM_PD power domains whose supply can be switched,
// each in one clock cycle, between the nominal rail and a lower data
// retention voltage. Because switching is that fast, the PM uses a purely
// reactive policy: a domain is kept awake while any of its ports is open,
// while a port of another domain that the PM has been programmed to connect
// to one of its ports is open, or while its can_sleep bit is clear; otherwise
// it is put to sleep. Domains talk to the PM over a Power InterFace (PIF)
// each, to open and close ports, to set their can_sleep bit and to arm a
// virtual alarm that wakes them later. The PM keeps one alarm per domain,
// sorts them (alarm_sorter), registers only the most urgent one, and compares
// it against the single 24-bit time wheel (time_wheel). When it expires the
// PM clears that domain's can_sleep bit, which wakes it and keeps it awake
// until the domain sets the bit again, and pulses the domain's `alarm` line.
//
// A configuration port (written by the microcontroller in the chip) programs
// the port interconnection table, the can_sleep bits and a power-control
// enable; with power control disabled every domain is held awake.
//
// Timing: a PIF request or configuration write sampled at a clock edge
// changes `pd_awake` at that same edge, i.e. within one cycle. An alarm is
// signalled at most two main-clock cycles after the time wheel reaches it.
// After reset power control is disabled, every can_sleep bit is clear and
// every domain is awake, so software can program the PM first.
//
// From the published design: the reactive policy and its two sleep conditions, the
// programmed port interconnections, the PIF, one-cycle activation, alarms
// sorted down to one compare against a 24-bit counter at 80 kHz, and the
// ability to disable power control. This implementation's own choices: the PIF
// messages, the register map, alarm expiry clearing can_sleep, and the reset
// state.
module power_manager
  import charm_pkg::*;
#(
  parameter int unsigned TIMER_DIV_P = TIMER_DIV
) (
  input  logic                    clk,
  input  logic                    rst_n,
  // Power InterFaces
  input  pif_req_t [NUM_PD-1:0]   pif_req,
  output pif_rsp_t [NUM_PD-1:0]   pif_rsp,
  // Power switch controls, one per domain (1 = vddhi, 0 = vddlo)
  output logic [NUM_PD-1:0]       pd_awake,
  // Configuration port
  input  logic                    cfg_we,
  input  logic [7:0]              cfg_addr,
  input  logic [31:0]             cfg_wdata,
  output logic [31:0]             cfg_rdata,
  // Time base
  output logic                    timer_tick,
  output logic [TIME_W-1:0]       now
);

  localparam int unsigned NCONN = NUM_PD * NUM_PORTS;

  // ---------------------------------------------------------------- state
  logic [NUM_PD-1:0][NUM_PORTS-1:0] port_open_q, port_open_d;
  logic [NUM_PD-1:0][NUM_PORTS-1:0] peer_open_q, peer_open_d;
  logic [NUM_PD-1:0]                can_sleep_q, can_sleep_d;
  logic                             pm_en_q, pm_en_d;
  conn_t [NCONN-1:0]                conn_q;
  logic [NUM_PD-1:0]                alarm_valid_q, alarm_valid_d;
  logic [NUM_PD-1:0][TIME_W-1:0]    alarm_time_q, alarm_time_d;
  logic                             sel_valid_q;
  logic [PD_W-1:0]                  sel_idx_q;
  logic [NUM_PD-1:0]                awake_q, awake_d;
  logic [NUM_PD-1:0]                alarm_pulse_q, fire_vec;

  // ---------------------------------------------------------------- time
  time_wheel #(.DIV(TIMER_DIV_P), .WIDTH(TIME_W)) u_wheel (
    .clk, .rst_n, .tick(timer_tick), .now
  );

  // ---------------------------------------------------------------- PIFs
  logic [NUM_PD-1:0]                dec_ack, dec_aset, dec_aclr, dec_cswr, dec_csval;
  logic [NUM_PD-1:0][NUM_PORTS-1:0] dec_oset, dec_oclr;
  logic [NUM_PD-1:0][TIME_W-1:0]    dec_atime;

  for (genvar g = 0; g < int'(NUM_PD); g++) begin : g_pif
    pif_decode u_dec (
      .req        (pif_req[g]),
      .awake      (awake_q[g]),
      .now        (now),
      .ack        (dec_ack[g]),
      .open_set   (dec_oset[g]),
      .open_clr   (dec_oclr[g]),
      .alarm_set  (dec_aset[g]),
      .alarm_clr  (dec_aclr[g]),
      .alarm_time (dec_atime[g]),
      .cs_wr      (dec_cswr[g]),
      .cs_val     (dec_csval[g])
    );
  end

  // ---------------------------------------------------------------- alarms
  logic            sort_valid;
  logic [PD_W-1:0] sort_idx;

  alarm_sorter #(.N(NUM_PD), .WIDTH(TIME_W)) u_sort (
    .valid      (alarm_valid_q),
    .alarm_time (alarm_time_q),
    .now        (now),
    .sel_valid  (sort_valid),
    .sel_idx    (sort_idx)
  );

  // The single comparator: only the registered most-urgent alarm is checked.
  logic                     fire;
  logic signed [TIME_W-1:0] sel_dist;
  assign sel_dist = alarm_time_q[sel_idx_q] - now;
  assign fire     = sel_valid_q && alarm_valid_q[sel_idx_q] && (sel_dist <= 0);

  always_comb begin
    fire_vec = '0;
    if (fire) fire_vec[sel_idx_q] = 1'b1;
  end

  // ---------------------------------------------------------------- next state
  logic cfg_conn_we, cfg_cs_we, cfg_ctrl_we;
  assign cfg_conn_we = cfg_we && (cfg_addr < 8'(NCONN));
  assign cfg_cs_we   = cfg_we && (cfg_addr == CFG_CAN_SLEEP);
  assign cfg_ctrl_we = cfg_we && (cfg_addr == CFG_CTRL);

  always_comb begin
    port_open_d   = port_open_q;
    can_sleep_d   = cfg_cs_we ? cfg_wdata[NUM_PD-1:0] : can_sleep_q;
    pm_en_d       = cfg_ctrl_we ? cfg_wdata[0] : pm_en_q;
    alarm_valid_d = alarm_valid_q;
    alarm_time_d  = alarm_time_q;
    for (int i = 0; i < int'(NUM_PD); i++) begin
      port_open_d[i] = (port_open_q[i] | dec_oset[i]) & ~dec_oclr[i];
      if (dec_cswr[i]) can_sleep_d[i] = dec_csval[i];
      // An expiring alarm wakes its domain and keeps it awake.
      if (fire_vec[i]) begin
        can_sleep_d[i]   = 1'b0;
        alarm_valid_d[i] = 1'b0;
      end
      if (dec_aclr[i]) alarm_valid_d[i] = 1'b0;
      if (dec_aset[i]) begin
        alarm_valid_d[i] = 1'b1;
        alarm_time_d[i]  = dec_atime[i];
      end
    end
  end

  // Ports opened by connected domains.
  always_comb begin
    peer_open_d = '0;
    for (int i = 0; i < int'(NUM_PD); i++) begin
      for (int p = 0; p < int'(NUM_PORTS); p++) begin
        if (port_open_d[i][p] && conn_q[i*NUM_PORTS+p].valid)
          peer_open_d[conn_q[i*NUM_PORTS+p].pd][conn_q[i*NUM_PORTS+p].port] = 1'b1;
      end
    end
  end

  // Reactive scheduling policy.
  always_comb begin
    for (int i = 0; i < int'(NUM_PD); i++)
      awake_d[i] = !pm_en_d || !can_sleep_d[i] || (|port_open_d[i]) || (|peer_open_d[i]);
  end

  // ---------------------------------------------------------------- registers
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      port_open_q   <= '0;
      peer_open_q   <= '0;
      can_sleep_q   <= '0;
      pm_en_q       <= 1'b0;
      conn_q        <= '0;
      alarm_valid_q <= '0;
      alarm_time_q  <= '0;
      sel_valid_q   <= 1'b0;
      sel_idx_q     <= '0;
      awake_q       <= '1;
      alarm_pulse_q <= '0;
    end else begin
      port_open_q   <= port_open_d;
      peer_open_q   <= peer_open_d;
      can_sleep_q   <= can_sleep_d;
      pm_en_q       <= pm_en_d;
      alarm_valid_q <= alarm_valid_d;
      alarm_time_q  <= alarm_time_d;
      sel_valid_q   <= sort_valid;
      sel_idx_q     <= sort_idx;
      awake_q       <= awake_d;
      alarm_pulse_q <= fire_vec;
      if (cfg_conn_we) conn_q[cfg_addr[$clog2(NCONN)-1:0]] <= conn_t'(cfg_wdata[$bits(conn_t)-1:0]);
    end
  end

  // ---------------------------------------------------------------- outputs
  assign pd_awake = awake_q;

  always_comb begin
    for (int i = 0; i < int'(NUM_PD); i++) begin
      pif_rsp[i].awake     = awake_q[i];
      pif_rsp[i].ack       = dec_ack[i];
      pif_rsp[i].alarm     = alarm_pulse_q[i];
      pif_rsp[i].port_open = port_open_q[i];
      pif_rsp[i].peer_open = peer_open_q[i];
    end
  end

  always_comb begin
    cfg_rdata = '0;
    if (cfg_addr < 8'(NCONN))
      cfg_rdata[$bits(conn_t)-1:0] = conn_q[cfg_addr[$clog2(NCONN)-1:0]];
    else begin
      unique case (cfg_addr)
        CFG_CAN_SLEEP: cfg_rdata[NUM_PD-1:0] = can_sleep_q;
        CFG_CTRL:      cfg_rdata[0] = pm_en_q;
        CFG_AWAKE:     cfg_rdata[NUM_PD-1:0] = awake_q;
        CFG_TIME:      cfg_rdata[TIME_W-1:0] = now;
        CFG_PORTS:     cfg_rdata[NUM_PD*NUM_PORTS-1:0] = port_open_q;
        default: ;
      endcase
    end
  end

  // A domain asleep must not have any PIF request accepted.
  a_no_ack_asleep: assert property (@(posedge clk) disable iff (!rst_n)
    (pif_req[0].valid && !awake_q[0]) |-> !pif_rsp[0].ack);

endmodule
