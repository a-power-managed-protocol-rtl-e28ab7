// time_wheel: the always-on system time wheel of the power manager.
//
// A single free-running counter is the time base for every power domain's
// virtual alarm, so that no domain has to stay awake just to count. The
// counter advances at the slow timer rate (80 kHz), which is derived from the
// 8 MHz main clock by dividing by DIV = 100. The divided rate is produced as
// a one-cycle clock enable (`tick`) on the main clock rather than as a second
// clock; that, and the reset value of zero, are this implementation's choices.
//
// Interface: `tick` is high for one main-clock cycle every DIV cycles; `now`
// increments on the clock edge at which `tick` is high and wraps at 2^WIDTH.
// The counter width (24 bits) and the two clock rates follow the published design.
module time_wheel #(
  parameter int unsigned DIV   = 100,
  parameter int unsigned WIDTH = 24
) (
  input  logic             clk,
  input  logic             rst_n,
  output logic             tick,
  output logic [WIDTH-1:0] now
);

  localparam int unsigned DW = (DIV > 1) ? $clog2(DIV) : 1;

  logic [DW-1:0] div_cnt;

  assign tick = (div_cnt == DW'(DIV - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      div_cnt <= '0;
      now     <= '0;
    end else begin
      div_cnt <= tick ? '0 : div_cnt + 1'b1;
      if (tick) now <= now + 1'b1;
    end
  end

endmodule
