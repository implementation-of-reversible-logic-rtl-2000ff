// comparator_tr: 1-bit comparator built on the TR gate.
//
// Function, as specified for this design:
//   Y1 = A and not B   (A > B)
//   Y2 = A nor B
//   Y3 = not A and B   (A < B)
// Y2 is the NOR of the inputs as specified (1 only for A = B = 0).
//
// Structure: one TR gate with its C input held at 0, as in the published
// layout. It gives P = A, Q = A xor B and R = A and B. Y1, Y2 and Y3 are
// formed from P and Q exactly as in comparator_fg. R carries no comparator
// result; as is usual for reversible designs the unused output is kept and
// brought out as the garbage output g (= A and B) rather than dropped. That
// port, and deriving the outputs from P and Q, are this design's choices.
//
// Interface: a, b in; y1, y2, y3, g out; clk and rst_n drive the zone model.
// Timing: outputs follow the inputs after DELAY_ZONES rising edges of clk;
// the default of 2 zones is the half QCA clock cycle published for this
// comparator. The TR gate inside is instantiated with no delay of its own,
// since the published comparator delay is shorter than the published delay
// of the stand-alone TR gate. A new input may be applied on every tick.
module comparator_tr
  import qca_pkg::*;
#(
  parameter int unsigned DELAY_ZONES = CMP_TR_DELAY_ZONES
) (
  input  logic clk,
  input  logic rst_n,
  input  logic a,
  input  logic b,
  output logic y1,
  output logic y2,
  output logic y3,
  output logic g
);

  logic     tr_p, tr_q, tr_r, tr_p_n, p_or_q;
  cmp_out_t comb_out, zone_out;
  logic     g_zone;

  tr_gate #(.DELAY_ZONES(0)) u_tr (
    .clk  (clk),
    .rst_n(rst_n),
    .a    (a),
    .b    (b),
    .c    (POL_NEG),
    .p    (tr_p),
    .q    (tr_q),
    .r    (tr_r)
  );

  qca_inverter u_inv_p  (.a(tr_p), .y(tr_p_n));
  qca_majority u_gt     (.a(tr_p),   .b(tr_q), .c(POL_NEG), .y(comb_out.y1));
  qca_majority u_lt     (.a(tr_p_n), .b(tr_q), .c(POL_NEG), .y(comb_out.y3));
  qca_majority u_or     (.a(tr_p),   .b(tr_q), .c(POL_POS), .y(p_or_q));
  qca_inverter u_inv_y2 (.a(p_or_q), .y(comb_out.y2));

  qca_wire #(.WIDTH($bits(cmp_out_t)), .ZONES(DELAY_ZONES)) u_zones (
    .clk  (clk),
    .rst_n(rst_n),
    .d    (comb_out),
    .q    (zone_out)
  );

  qca_wire #(.WIDTH(1), .ZONES(DELAY_ZONES)) u_zones_g (
    .clk  (clk),
    .rst_n(rst_n),
    .d    (tr_r),
    .q    (g_zone)
  );

  always_comb begin
    y1 = zone_out.y1;
    y2 = zone_out.y2;
    y3 = zone_out.y3;
    g  = g_zone;
  end

endmodule
