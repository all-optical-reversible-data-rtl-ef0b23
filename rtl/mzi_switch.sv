// mzi_switch -- Boolean model of an SOA-based Mach-Zehnder interferometer
// all-optical switch.
//
// The switch has two inputs, the incoming signal (wavelength lambda_1) and the
// control signal (lambda_2), and two outputs, the bar port and the cross port.
// Light present is logic 1, no light is logic 0. When the control is lit, the
// incoming light leaves at the bar port; when it is dark, the light is switched
// to the cross port. So bar_port = in_sig & ctrl and cross_port = in_sig & ~ctrl, and an
// unlit incoming signal lights neither port.
//
// Interface: in_sig, ctrl -> bar_port, cross_port. Purely combinational. The optical
// switch has one unit of delay; that delay is not modelled here.
//
// The port behaviour follows the published description of the switch. The
// amplifiers and couplers inside the interferometer are analog parts and are
// represented only through this truth table.
module mzi_switch (
  input  logic in_sig,  // incoming signal (port A)
  input  logic ctrl,    // control signal (port B)
  output logic bar_port,    // A.B
  output logic cross_port  // A.B'
);

  always_comb begin
    bar_port   = in_sig & ctrl;
    cross_port = in_sig & ~ctrl;
  end

endmodule
