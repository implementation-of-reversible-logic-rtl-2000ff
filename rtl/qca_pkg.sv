// qca_pkg: types and constants shared by the QCA reversible-gate library.
//
// The gates are modelled on a four-phase QCA clock. One tick of the digital
// clock `clk` stands for one QCA clock zone (a quarter of a QCA clock cycle),
// so a delay of one QCA clock cycle is ZONES_PER_CYCLE ticks. The delay
// constants below are the "time delay" figures of the published cell layouts,
// given in QCA clock cycles and converted here to zones:
//   proposed Feynman gate         0.5 cycle -> 2 zones
//   TR gate                       1   cycle -> 4 zones
//   1-bit comparator (either one) 0.5 cycle -> 2 zones
// Treating each zone as one register stage is this library's own modelling
// choice; the published designs are QCA layouts, not clocked CMOS.
package qca_pkg;

  // Number of clock zones (clock phases) in one QCA clock cycle.
  localparam int unsigned ZONES_PER_CYCLE = 4;

  // Input-to-output latency of each design, in clock zones.
  localparam int unsigned FEYNMAN_DELAY_ZONES = ZONES_PER_CYCLE / 2;  // 0.5 cycle
  localparam int unsigned TR_DELAY_ZONES      = ZONES_PER_CYCLE;      // 1 cycle
  localparam int unsigned CMP_FG_DELAY_ZONES  = ZONES_PER_CYCLE / 2;  // 0.5 cycle
  localparam int unsigned CMP_TR_DELAY_ZONES  = ZONES_PER_CYCLE / 2;  // 0.5 cycle

  // Fixed-polarity cells of a majority gate: polarization -1 reads as logic 0,
  // +1 as logic 1. A majority gate with one input fixed at -1 is an AND, with
  // one input fixed at +1 an OR.
  localparam logic POL_NEG = 1'b0;
  localparam logic POL_POS = 1'b1;

  // Outputs of the 2x2 Feynman gate: P = A, Q = A xor B.
  typedef struct packed {
    logic p;
    logic q;
  } feynman_out_t;

  // Outputs of the 3x3 TR gate: P = A, Q = A xor B, R = (A and B) xor C.
  typedef struct packed {
    logic p;
    logic q;
    logic r;
  } tr_out_t;

  // Outputs of a 1-bit comparator: Y1 = A B' (A > B), Y2 = A nor B,
  // Y3 = A' B (A < B).
  typedef struct packed {
    logic y1;
    logic y2;
    logic y3;
  } cmp_out_t;

endpackage
