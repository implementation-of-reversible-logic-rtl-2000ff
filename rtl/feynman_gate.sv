// feynman_gate: the proposed 2x2 reversible Feynman (controlled-NOT) gate in
// QCA majority logic.
//
// Function: P = A, Q = A xor B. The gate is reversible: (A, B) can be
// recovered from (P, Q), because A = P and B = P xor Q.
//
// Structure: the layout this follows has three majority gates, the two outer
// ones with a fixed cell at -1 (AND) and the centre one with a fixed cell at
// +1 (OR), so Q = (A and not B) or (not A and B). Where the two inverters sit
// cannot be read from the layout; placing them on the second input of each
// AND is this design's choice. P is the A line carried through.
//
// Interface: a, b in; p, q out; clk and rst_n drive the zone model of
// qca_wire. Timing: outputs follow the inputs after DELAY_ZONES rising
// edges of clk. The default of 2 zones is the half QCA clock cycle published
// for this layout; 0 gives a combinational gate for use inside larger
// designs. A new input may be applied on every tick.
module feynman_gate
  import qca_pkg::*;
#(
  parameter int unsigned DELAY_ZONES = FEYNMAN_DELAY_ZONES
) (
  input  logic clk,
  input  logic rst_n,
  input  logic a,
  input  logic b,
  output logic p,
  output logic q
);

  logic         a_n, b_n;
  logic         a_and_bn, an_and_b;
  feynman_out_t comb_out, zone_out;

  qca_inverter u_inv_a (.a(a), .y(a_n));
  qca_inverter u_inv_b (.a(b), .y(b_n));

  // Left and right majority gates, fixed cell at -1: AND.
  qca_majority u_and_l (.a(a),   .b(b_n), .c(POL_NEG), .y(a_and_bn));
  qca_majority u_and_r (.a(a_n), .b(b),   .c(POL_NEG), .y(an_and_b));

  // Centre majority gate, fixed cell at +1: OR.
  qca_majority u_or_c (.a(a_and_bn), .b(an_and_b), .c(POL_POS), .y(comb_out.q));

  always_comb comb_out.p = a;

  qca_wire #(.WIDTH($bits(feynman_out_t)), .ZONES(DELAY_ZONES)) u_zones (
    .clk  (clk),
    .rst_n(rst_n),
    .d    (comb_out),
    .q    (zone_out)
  );

  always_comb begin
    p = zone_out.p;
    q = zone_out.q;
  end

endmodule
