// alarm_sorter: picks the most urgent of the power domains' virtual alarms.
//
// Each domain may hold one alarm, an absolute time on the system time wheel.
// Only the alarm closest in time is handed on to the single comparator
// against the time-wheel counter, so one 24-bit comparison serves all
// domains. Urgency is the signed distance alarm_time - now, read as a
// two's-complement WIDTH-bit number: alarms already due (distance <= 0) are
// the most urgent, which keeps a late alarm from being lost, and the wheel
// can wrap freely as long as no alarm is set more than 2^(WIDTH-1) ticks
// ahead. Ties go to the lowest domain index. The selection rule and the
// signed-distance ordering are this implementation's choices; the published design says only
// that the alarms are sorted and the most urgent one is selected.
//
// Purely combinational: sel_valid/sel_idx follow the inputs in the same cycle.
module alarm_sorter #(
  parameter int unsigned N     = 8,
  parameter int unsigned WIDTH = 24
) (
  input  logic [N-1:0]            valid,
  input  logic [N-1:0][WIDTH-1:0] alarm_time,
  input  logic [WIDTH-1:0]        now,
  output logic                    sel_valid,
  output logic [$clog2(N)-1:0]    sel_idx
);

  logic signed [WIDTH-1:0] best_dist;
  logic signed [WIDTH-1:0] cur_dist;

  always_comb begin
    sel_valid = 1'b0;
    sel_idx   = '0;
    best_dist = '0;
    cur_dist  = '0;
    for (int i = 0; i < int'(N); i++) begin
      cur_dist = alarm_time[i] - now;
      if (valid[i] && (!sel_valid || cur_dist < best_dist)) begin
        sel_valid = 1'b1;
        sel_idx   = i[$clog2(N)-1:0];
        best_dist = cur_dist;
      end
    end
  end

endmodule
