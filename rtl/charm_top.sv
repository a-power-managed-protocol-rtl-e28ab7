// charm_top: power-managed protocol processor for a wireless sensor node.
//
// The chip runs a sensor-network protocol stack (application and network
// layers on an 8051-compatible microcontroller, a data-link layer, neighbour
// management, location, the digital baseband of an on-off-keyed radio, and
// console/peripheral interfaces) split into eight power domains. A central
// power manager switches each domain between the nominal supply and a data
// retention voltage in one clock cycle, driven by the port sessions the
// domains open and close, their can_sleep bits and a shared alarm time wheel.
//
// This top holds what is specified well enough to be built as logic: the
// power manager with its PIFs, time wheel and alarm sorting; one
// power-switch model per domain; the queues domain with its TX and RX
// packet queues behind signal walls; and the microcontroller's 64 kB
// program/data RAM. The protocol subsystems themselves are outside: each
// domain's PIF request enters as a port (behind a signal wall that grounds it
// while the domain sleeps), each domain's switch control and virtual supply
// leave as ports, and so do the queue and RAM access ports.
//
// Queue walls: the net side of the queues domain is its port 0 and the DLL
// side its port 1. The signals of a side pass only while the queues domain
// is awake and that port is open, either by the queues domain itself or by a
// connected port of another domain (the power manager's port table).
//
// The domain list, the block set and their links (power manager on a power
// control bus to every domain, queues between microcontroller and DLL, RAM
// beside the microcontroller) follow the published design. The domain
// numbering, the port numbers of the queue sides, and walling both directions
// of the queues domain are this implementation's choices.
//
// Clocking: one 8 MHz main clock; the 80 kHz timer is a clock enable.
// Timing of the PIF and configuration port: see power_manager.
module charm_top
  import charm_pkg::*;
(
  input  logic                    clk,
  input  logic                    rst_n,
  // Power InterFaces of the eight domains (index = charm_pkg::pd_id_e)
  input  pif_req_t [NUM_PD-1:0]   pif_req,
  output pif_rsp_t [NUM_PD-1:0]   pif_rsp,
  // Power switch control after the switch buffer tree, and virtual supply
  output logic [NUM_PD-1:0]       pd_awake,
  output real                     pd_vvdd [NUM_PD],
  // Power-manager configuration port (microcontroller)
  input  logic                    cfg_we,
  input  logic [7:0]              cfg_addr,
  input  logic [31:0]             cfg_wdata,
  output logic [31:0]             cfg_rdata,
  // System time
  output logic                    timer_tick,
  output logic [TIME_W-1:0]       now,
  // 64 kB program/data RAM (microcontroller side)
  input  logic                    mem_en,
  input  logic                    mem_we,
  input  logic [15:0]             mem_addr,
  input  logic [7:0]              mem_wdata,
  output logic [7:0]              mem_rdata,
  // Packet queues, network-layer side
  input  logic                    net_tx_wr,
  input  logic [7:0]              net_tx_data,
  output logic                    net_tx_full,
  input  logic                    net_rx_rd,
  output logic [7:0]              net_rx_data,
  output logic                    net_rx_empty,
  // Packet queues, data-link-layer side
  input  logic                    dll_tx_rd,
  output logic [7:0]              dll_tx_data,
  output logic                    dll_tx_empty,
  input  logic                    dll_rx_wr,
  input  logic [7:0]              dll_rx_data,
  output logic                    dll_rx_full
);

  localparam int unsigned QDEPTH   = 1024;
  localparam int unsigned PORT_NET = 0;
  localparam int unsigned PORT_DLL = 1;

  // ------------------------------------------------------------ power manager
  pif_req_t [NUM_PD-1:0] pif_req_w;   // requests after the signal walls
  logic [NUM_PD-1:0]     pm_awake;

  power_manager u_pm (
    .clk, .rst_n,
    .pif_req   (pif_req_w),
    .pif_rsp   (pif_rsp),
    .pd_awake  (pm_awake),
    .cfg_we, .cfg_addr, .cfg_wdata, .cfg_rdata,
    .timer_tick, .now
  );

  // ------------------------------------------------- switches and PIF walls
  for (genvar g = 0; g < int'(NUM_PD); g++) begin : g_pd
    power_switch u_sw (
      .awake     (pm_awake[g]),
      .awake_buf (pd_awake[g]),
      .vvdd      (pd_vvdd[g])
    );

    signal_wall #(.W($bits(pif_req_t))) u_pif_wall (
      .hot   (pif_req[g]),
      .pd_en (pd_awake[g]),
      .open  (1'b1),
      .gated (pif_req_w[g])
    );
  end

  // ------------------------------------------------------------ queues domain
  logic q_en, q_net_open, q_dll_open;
  assign q_en       = pd_awake[PD_QUEUES];
  assign q_net_open = pif_rsp[PD_QUEUES].port_open[PORT_NET] | pif_rsp[PD_QUEUES].peer_open[PORT_NET];
  assign q_dll_open = pif_rsp[PD_QUEUES].port_open[PORT_DLL] | pif_rsp[PD_QUEUES].peer_open[PORT_DLL];

  logic       q_net_tx_wr, q_net_rx_rd, q_dll_tx_rd, q_dll_rx_wr;
  logic [7:0] q_net_tx_data, q_dll_rx_data;
  logic       q_net_tx_full, q_net_rx_empty, q_dll_tx_empty, q_dll_rx_full;
  logic [7:0] q_net_rx_data, q_dll_tx_data;

  // Inputs into the sleeping-capable queues domain.
  signal_wall #(.W(10)) u_wall_net_in (
    .hot   ({net_tx_wr, net_rx_rd, net_tx_data}),
    .pd_en (q_en), .open(q_net_open),
    .gated ({q_net_tx_wr, q_net_rx_rd, q_net_tx_data})
  );
  signal_wall #(.W(10)) u_wall_dll_in (
    .hot   ({dll_tx_rd, dll_rx_wr, dll_rx_data}),
    .pd_en (q_en), .open(q_dll_open),
    .gated ({q_dll_tx_rd, q_dll_rx_wr, q_dll_rx_data})
  );
  // Outputs of the queues domain.
  signal_wall #(.W(10)) u_wall_net_out (
    .hot   ({q_net_tx_full, q_net_rx_empty, q_net_rx_data}),
    .pd_en (q_en), .open(q_net_open),
    .gated ({net_tx_full, net_rx_empty, net_rx_data})
  );
  signal_wall #(.W(10)) u_wall_dll_out (
    .hot   ({q_dll_tx_empty, q_dll_rx_full, q_dll_tx_data}),
    .pd_en (q_en), .open(q_dll_open),
    .gated ({dll_tx_empty, dll_rx_full, dll_tx_data})
  );

  packet_queues #(.DEPTH(QDEPTH)) u_queues (
    .clk, .rst_n,
    .net_tx_wr   (q_net_tx_wr),   .net_tx_data (q_net_tx_data), .net_tx_full (q_net_tx_full),
    .net_rx_rd   (q_net_rx_rd),   .net_rx_data (q_net_rx_data), .net_rx_empty(q_net_rx_empty),
    .dll_tx_rd   (q_dll_tx_rd),   .dll_tx_data (q_dll_tx_data), .dll_tx_empty(q_dll_tx_empty),
    .dll_rx_wr   (q_dll_rx_wr),   .dll_rx_data (q_dll_rx_data), .dll_rx_full (q_dll_rx_full),
    .tx_level    (),
    .rx_level    ()
  );

  // ------------------------------------------------- microcontroller memory
  sram_sp #(.DEPTH(65536), .W(8)) u_ram (
    .clk,
    .en    (mem_en),
    .we    (mem_we),
    .addr  (mem_addr),
    .wdata (mem_wdata),
    .rdata (mem_rdata)
  );

endmodule
