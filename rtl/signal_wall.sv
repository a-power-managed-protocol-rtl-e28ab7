// signal_wall: isolates the signals of one port bundle at a power-domain
// boundary.
//
// While a domain sleeps at its retention voltage, the signals crossing into or
// out of it must not carry spurious values. Each bit of the wall passes the
// driven ("hot") value only while the domain is enabled (pd_en) and the port
// session is open (open); otherwise the output ("gated") is tied to ground,
// which is never switched off. In the circuit this is two pass gates in series
// with a pull-down to ground for each of the two controls; here it is the
// equivalent logic function, gated = hot when pd_en and open, else 0.
//
// Combinational, W bits wide (W is this implementation's parameter).
module signal_wall #(
  parameter int unsigned W = 8
) (
  input  logic [W-1:0] hot,
  input  logic         pd_en,
  input  logic         open,
  output logic [W-1:0] gated
);

  assign gated = (pd_en && open) ? hot : '0;

endmodule
