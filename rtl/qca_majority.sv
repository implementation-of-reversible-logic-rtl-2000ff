// qca_majority: three-input QCA majority voter.
//
// The QCA majority gate is five cells: three inputs around a central device
// cell and one output; the device cell settles to the polarization held by at
// least two inputs. Logically y = ab + bc + ca. Holding one input at
// polarization -1 (logic 0) turns it into a two-input AND, at +1 (logic 1)
// into a two-input OR; every gate in this library is built that way.
//
// Interface: a, b, c in; y out. Purely combinational: the zone delay of a
// layout is modelled separately by qca_wire.
module qca_majority (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic y
);

  always_comb y = (a & b) | (b & c) | (c & a);

endmodule
