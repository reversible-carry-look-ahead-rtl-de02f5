// SOA-based Mach-Zehnder interferometer switch, logic-level model.
//
// The switch has a signal input and a control input. With no control pulse
// the interferometer is balanced and the signal leaves by the cross port;
// a control pulse saturates one SOA, shifts its phase and steers the signal
// to the bar port. Light present is logic 1, so:
//   bar_port   = in_beam & ctrl
//   cross_port = in_beam & ~ctrl
// It is the only device counted in the optical cost of a circuit (the
// number of MZI switches). Representing light by on/off levels is the usual logic
// abstraction of the device; gain, phase and wavelength are not modelled.
// Purely combinational, no clock.
module mzi_switch (
  input  logic in_beam,
  input  logic ctrl,
  output logic bar_port,
  output logic cross_port
);

  always_comb begin
    bar_port   = in_beam & ctrl;
    cross_port = in_beam & ~ctrl;
  end

endmodule
