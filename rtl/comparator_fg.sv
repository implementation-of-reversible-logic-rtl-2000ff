// comparator_fg: 1-bit comparator built on the proposed Feynman gate.
//
// Function, as specified for this design:
//   Y1 = A and not B   (A > B)
//   Y2 = A nor B
//   Y3 = not A and B   (A < B)
// Y2 is the NOR of the inputs as specified, so it is 1 only for A = B = 0;
// it does not flag A = B = 1. Full equality would be not Q of the Feynman
// gate, which this design does not bring out.
//
// Structure: one Feynman gate gives P = A and Q = A xor B. Because
// A and (A xor B) = A and not B, and A or (A xor B) = A or B, all three
// outputs come from P and Q: Y1 = maj(P, Q, -1), Y3 = maj(not P, Q, -1),
// Y2 = not maj(P, Q, +1). The published layout has majority gates with a
// fixed -1 cell at the Y1 and Y3 outputs; deriving every output from P and
// Q, and the inverter placement, are this design's own choices.
//
// Interface: a, b in; y1, y2, y3 out; clk and rst_n drive the zone model.
// Timing: outputs follow the inputs after DELAY_ZONES rising edges of clk;
// the default of 2 zones is the half QCA clock cycle published for this
// comparator. A new input may be applied on every tick.
module comparator_fg
  import qca_pkg::*;
#(
  parameter int unsigned DELAY_ZONES = CMP_FG_DELAY_ZONES
) (
  input  logic clk,
  input  logic rst_n,
  input  logic a,
  input  logic b,
  output logic y1,
  output logic y2,
  output logic y3
);

  logic     fg_p, fg_q, fg_p_n, p_or_q;
  cmp_out_t comb_out, zone_out;

  feynman_gate #(.DELAY_ZONES(0)) u_feynman (
    .clk  (clk),
    .rst_n(rst_n),
    .a    (a),
    .b    (b),
    .p    (fg_p),
    .q    (fg_q)
  );

  qca_inverter u_inv_p  (.a(fg_p), .y(fg_p_n));
  qca_majority u_gt     (.a(fg_p),   .b(fg_q), .c(POL_NEG), .y(comb_out.y1));
  qca_majority u_lt     (.a(fg_p_n), .b(fg_q), .c(POL_NEG), .y(comb_out.y3));
  qca_majority u_or     (.a(fg_p),   .b(fg_q), .c(POL_POS), .y(p_or_q));
  qca_inverter u_inv_y2 (.a(p_or_q), .y(comb_out.y2));

  qca_wire #(.WIDTH($bits(cmp_out_t)), .ZONES(DELAY_ZONES)) u_zones (
    .clk  (clk),
    .rst_n(rst_n),
    .d    (comb_out),
    .q    (zone_out)
  );

  always_comb begin
    y1 = zone_out.y1;
    y2 = zone_out.y2;
    y3 = zone_out.y3;
  end

endmodule
