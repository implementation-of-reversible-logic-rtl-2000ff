// qca_wire: clocked QCA binary wire, WIDTH signals carried across ZONES clock
// zones.
//
// A QCA wire is a row of cells that passes a polarization from one end to the
// other. Under the four-phase QCA clock each clock zone latches its value and
// hands it to the next zone one phase later, so a wire crossing ZONES zones
// behaves as a ZONES-stage shift register clocked once per zone. With
// ZONES = 0 the wire is treated as lying within the zone of its driver and is
// a plain connection; clk and rst_n are then unused, and lint reports them
// as such for every zero-delay instance.
//
// Interface: clk advances data by one zone per rising edge; rst_n
// (asynchronous, active low) clears every zone to 0, which stands for
// polarization -1; d in, q out, WIDTH bits each.
// Timing: q follows d exactly ZONES rising edges later. One value per tick
// is accepted, as the QCA clock pipelines a new input every phase.
// The register model of the zones and the reset to 0 are this library's own
// choices; the published designs only colour cells by clock zone.
module qca_wire #(
  parameter int unsigned WIDTH = 1,
  parameter int unsigned ZONES = 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);

  if (ZONES == 0) begin : g_direct
    always_comb q = d;
  end else begin : g_zones
    logic [WIDTH-1:0] zone [ZONES];

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        for (int unsigned i = 0; i < ZONES; i++) zone[i] <= '0;
      end else begin
        zone[0] <= d;
        for (int unsigned i = 1; i < ZONES; i++) zone[i] <= zone[i-1];
      end
    end

    always_comb q = zone[ZONES-1];
  end

endmodule
