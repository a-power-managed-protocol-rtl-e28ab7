// power_switch: behavioural model of one power-switch cell of a power domain.
// It is a circuit of two supply rails and transistors, not synthesizable
// logic; this model only reproduces its behaviour for simulation.
//
// The cell connects the domain's virtual vdd either to the nominal supply
// vddhi (awake = 1) or to the data retention voltage vddlo (awake = 0), so a
// sleeping domain keeps its state while leaking less. The awake input first
// passes an inverter powered from vddhi whose output drives both switch
// devices; a second vddhi inverter restores the polarity and drives
// `awake_buf`, so that chained cells (one every 30 um along the power grid)
// form the buffer tree that distributes the control signal. In this model the
// virtual vdd is a real-valued voltage; VDDHI = 1.0 V is the chip's core
// supply and VDDLO = 0.3 V the low end of its 0.3-1.0 V retention range, both
// overridable. Switching is modelled as instantaneous.
module power_switch #(
  parameter real VDDHI = 1.0,
  parameter real VDDLO = 0.3
) (
  input  logic awake,
  output logic awake_buf,
  output real  vvdd
);

  logic awake_n;  // first inverter output, gate of both switch devices

  assign awake_n   = ~awake;
  assign awake_buf = ~awake_n;
  assign vvdd      = awake_n ? VDDLO : VDDHI;

endmodule
