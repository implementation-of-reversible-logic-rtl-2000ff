// qca_reversible_top: the reversible QCA gate set, side by side.
//
// Holds the four designs of the library, each with its own inputs and
// outputs and all sharing the zone clock and reset:
//   - the proposed Feynman gate          (P = A, Q = A xor B)
//   - the TR gate                        (P = A, Q = A xor B, R = AB xor C)
//   - the 1-bit comparator on a Feynman gate (Y1 = AB', Y2 = A nor B, Y3 = A'B)
//   - the 1-bit comparator on a TR gate      (same outputs, plus garbage AB)
// The designs do not feed one another; the top only gives them one place
// to be simulated and synthesized together.
//
// Interface: clk advances every design by one QCA clock zone per rising
// edge; rst_n (asynchronous, active low) clears the zone registers. Outputs
// are grouped in the structs of qca_pkg.
// Timing: Feynman gate 2 zones, TR gate 4 zones, each comparator 2 zones,
// from input to output (the published half and whole QCA clock cycles at
// four zones per cycle). Every design accepts a new input on every tick.
module qca_reversible_top
  import qca_pkg::*;
(
  input  logic         clk,
  input  logic         rst_n,
  // Feynman gate
  input  logic         fg_a,
  input  logic         fg_b,
  output feynman_out_t fg_out,
  // TR gate
  input  logic         tr_a,
  input  logic         tr_b,
  input  logic         tr_c,
  output tr_out_t      tr_out,
  // 1-bit comparator on a Feynman gate
  input  logic         cmp_fg_a,
  input  logic         cmp_fg_b,
  output cmp_out_t     cmp_fg_out,
  // 1-bit comparator on a TR gate
  input  logic         cmp_tr_a,
  input  logic         cmp_tr_b,
  output cmp_out_t     cmp_tr_out,
  output logic         cmp_tr_garbage
);

  feynman_gate u_feynman (
    .clk  (clk),
    .rst_n(rst_n),
    .a    (fg_a),
    .b    (fg_b),
    .p    (fg_out.p),
    .q    (fg_out.q)
  );

  tr_gate u_tr (
    .clk  (clk),
    .rst_n(rst_n),
    .a    (tr_a),
    .b    (tr_b),
    .c    (tr_c),
    .p    (tr_out.p),
    .q    (tr_out.q),
    .r    (tr_out.r)
  );

  comparator_fg u_cmp_fg (
    .clk  (clk),
    .rst_n(rst_n),
    .a    (cmp_fg_a),
    .b    (cmp_fg_b),
    .y1   (cmp_fg_out.y1),
    .y2   (cmp_fg_out.y2),
    .y3   (cmp_fg_out.y3)
  );

  comparator_tr u_cmp_tr (
    .clk  (clk),
    .rst_n(rst_n),
    .a    (cmp_tr_a),
    .b    (cmp_tr_b),
    .y1   (cmp_tr_out.y1),
    .y2   (cmp_tr_out.y2),
    .y3   (cmp_tr_out.y3),
    .g    (cmp_tr_garbage)
  );

endmodule
