// qca_inverter: QCA inverter.
//
// In QCA an inverter is made by letting a signal line couple diagonally into
// an offset cell, which takes the opposite polarization. Logically y = not a.
//
// Interface: a in, y out. Combinational.
module qca_inverter (
  input  logic a,
  output logic y
);

  always_comb y = ~a;

endmodule
