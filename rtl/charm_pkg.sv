// charm_pkg: types and constants shared by the power-management logic of the
// sensor-node protocol processor.
//
// The chip is split into eight power domains (PDs). Each PD talks to the
// central power manager through a Power InterFace (PIF): a one-cycle request
// (pif_req_t) going to the manager and a status bundle (pif_rsp_t) coming
// back. The eight PDs and their order follow the domains the chip names
// (if, baseband, serial, neighbor, location, queues, dw8051, dll); the PIF
// message set, its encoding and all widths below are this implementation's own
// choices, since only the existence of a standard PIF is given.
package charm_pkg;

  // Number of power domains and of bundled I/O ports per domain.
  localparam int unsigned NUM_PD      = 8;
  localparam int unsigned PD_W        = $clog2(NUM_PD);
  localparam int unsigned NUM_PORTS   = 4;
  localparam int unsigned PORT_W      = $clog2(NUM_PORTS);
  // System time wheel: 24-bit counter, 8 MHz main clock / 100 = 80 kHz.
  localparam int unsigned TIME_W      = 24;
  localparam int unsigned TIMER_DIV   = 100;

  // Power-domain indices.
  typedef enum logic [PD_W-1:0] {
    PD_IF       = 3'd0,
    PD_BASEBAND = 3'd1,
    PD_SERIAL   = 3'd2,
    PD_NEIGHBOR = 3'd3,
    PD_LOCATION = 3'd4,
    PD_QUEUES   = 3'd5,
    PD_DW8051   = 3'd6,
    PD_DLL      = 3'd7
  } pd_id_e;

  // Power control messages a PD can issue through its PIF.
  typedef enum logic [2:0] {
    PIF_NOP        = 3'd0,
    PIF_OPEN       = 3'd1,  // open port `port` of the issuing PD
    PIF_CLOSE      = 3'd2,  // close port `port`
    PIF_SET_ALARM  = 3'd3,  // wake me `arg` timer ticks from now
    PIF_CLR_ALARM  = 3'd4,  // cancel my alarm
    PIF_CAN_SLEEP  = 3'd5   // set my can_sleep bit to arg[0]
  } pif_op_e;

  typedef struct packed {
    logic                valid;
    pif_op_e             op;
    logic [PORT_W-1:0]   port;
    logic [TIME_W-1:0]   arg;
  } pif_req_t;

  typedef struct packed {
    logic                 awake;      // PD supply is at vddhi
    logic                 ack;        // request accepted this cycle
    logic                 alarm;      // one-cycle pulse: my alarm expired
    logic [NUM_PORTS-1:0] port_open;  // my own ports that are open
    logic [NUM_PORTS-1:0] peer_open;  // my ports opened from a connected PD
  } pif_rsp_t;

  // One entry of the port interconnection table: port (src_pd, src_port)
  // is wired to port (pd, port) of another PD.
  typedef struct packed {
    logic              valid;
    logic [PD_W-1:0]   pd;
    logic [PORT_W-1:0] port;
  } conn_t;

  // Configuration register map of the power manager (word addresses).
  // Addresses 0 .. NUM_PD*NUM_PORTS-1 hold the port interconnection table,
  // entry pd*NUM_PORTS+port.
  localparam logic [7:0] CFG_CAN_SLEEP = 8'h20;  // [NUM_PD-1:0] can_sleep
  localparam logic [7:0] CFG_CTRL      = 8'h21;  // [0] power control enable
  localparam logic [7:0] CFG_AWAKE     = 8'h22;  // RO: awake vector
  localparam logic [7:0] CFG_TIME      = 8'h23;  // RO: time wheel
  localparam logic [7:0] CFG_PORTS     = 8'h24;  // RO: open-port matrix

endpackage
