// tr_gate: the 3x3 reversible Thapliyal-Ranganathan (TR) gate in QCA
// majority logic.
//
// Function: P = A, Q = A xor B, R = (A and B) xor C. The gate is reversible:
// A = P, B = P xor Q, C = R xor (A and B).
//
// Structure, following the published layout: the P and Q outputs come from a
// copy of the proposed Feynman gate (instantiated here with no delay of its
// own). A majority gate with a fixed cell at -1 forms A and B. The second
// exclusive-OR, of (A and B) with C, uses three majority gates whose fixed
// cells are +1, -1 and +1: an OR and an AND of the two operands, then an OR
// of the inverted OR with the AND, which is the XNOR, inverted once more at
// the output. That arrangement of inverters is this design's own reading; the
// layout shows the fixed polarities but not where the inversions are.
//
// Interface: a, b, c in; p, q, r out; clk and rst_n drive the zone model.
// Timing: outputs follow the inputs after DELAY_ZONES rising edges of clk;
// the default of 4 zones is the one QCA clock cycle published for this gate.
// A new input may be applied on every tick.
module tr_gate
  import qca_pkg::*;
#(
  parameter int unsigned DELAY_ZONES = TR_DELAY_ZONES
) (
  input  logic clk,
  input  logic rst_n,
  input  logic a,
  input  logic b,
  input  logic c,
  output logic p,
  output logic q,
  output logic r
);

  logic    fg_p, fg_q;
  logic    ab;
  logic    ab_or_c, ab_and_c, ab_or_c_n, r_n;
  tr_out_t comb_out, zone_out;

  // Feynman section: P = A, Q = A xor B.
  feynman_gate #(.DELAY_ZONES(0)) u_feynman (
    .clk  (clk),
    .rst_n(rst_n),
    .a    (a),
    .b    (b),
    .p    (fg_p),
    .q    (fg_q)
  );

  // A and B: majority gate with a fixed cell at -1.
  qca_majority u_and_ab (.a(a), .b(b), .c(POL_NEG), .y(ab));

  // (A and B) xor C from majority gates with fixed cells +1, -1, +1.
  qca_majority u_or_l   (.a(ab), .b(c), .c(POL_POS), .y(ab_or_c));
  qca_majority u_and_r  (.a(ab), .b(c), .c(POL_NEG), .y(ab_and_c));
  qca_inverter u_inv_or (.a(ab_or_c), .y(ab_or_c_n));
  qca_majority u_or_c   (.a(ab_or_c_n), .b(ab_and_c), .c(POL_POS), .y(r_n));
  qca_inverter u_inv_r  (.a(r_n), .y(comb_out.r));

  always_comb begin
    comb_out.p = fg_p;
    comb_out.q = fg_q;
  end

  qca_wire #(.WIDTH($bits(tr_out_t)), .ZONES(DELAY_ZONES)) u_zones (
    .clk  (clk),
    .rst_n(rst_n),
    .d    (comb_out),
    .q    (zone_out)
  );

  always_comb begin
    p = zone_out.p;
    q = zone_out.q;
    r = zone_out.r;
  end

endmodule
