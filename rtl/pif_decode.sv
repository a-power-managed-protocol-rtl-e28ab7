// pif_decode: the power manager's end of one Power InterFace (PIF).
//
// Every power domain sends power control messages to the central manager over
// an identical PIF, which lets domains and manager be combined plug-and-play.
// This block turns one PIF request into the state updates the manager
// applies: set or clear one of the domain's port bits, arm or cancel its
// virtual alarm, or write its can_sleep bit. A request counts only while the
// issuing domain is awake (a sleeping domain's outputs are grounded by its
// signal wall anyway); `ack` tells the domain it was taken. Alarms are
// relative: the alarm time is `now + arg` timer ticks. The message set and
// encoding (charm_pkg::pif_op_e) are this implementation's choices.
//
// Purely combinational; the manager registers the results on the next edge.
module pif_decode
  import charm_pkg::*;
(
  input  pif_req_t                 req,
  input  logic                     awake,
  input  logic [TIME_W-1:0]        now,
  output logic                     ack,
  output logic [NUM_PORTS-1:0]     open_set,
  output logic [NUM_PORTS-1:0]     open_clr,
  output logic                     alarm_set,
  output logic                     alarm_clr,
  output logic [TIME_W-1:0]        alarm_time,
  output logic                     cs_wr,
  output logic                     cs_val
);

  logic take;
  assign take       = req.valid && awake;
  assign ack        = take;
  assign alarm_time = now + req.arg;
  assign cs_val     = req.arg[0];

  always_comb begin
    open_set  = '0;
    open_clr  = '0;
    alarm_set = 1'b0;
    alarm_clr = 1'b0;
    cs_wr     = 1'b0;
    if (take) begin
      unique case (req.op)
        PIF_OPEN:      open_set[req.port] = 1'b1;
        PIF_CLOSE:     open_clr[req.port] = 1'b1;
        PIF_SET_ALARM: alarm_set = 1'b1;
        PIF_CLR_ALARM: alarm_clr = 1'b1;
        PIF_CAN_SLEEP: cs_wr = 1'b1;
        default: ;
      endcase
    end
  end

endmodule
