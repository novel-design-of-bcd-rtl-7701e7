// Clocked carriage of a word through the clock zones of a QCA circuit.
//
// A QCA circuit is clocked by four phase-shifted signals that raise and
// lower the tunnelling barriers of successive groups of cells (clock
// zones), so information moves forward one zone per clock phase and takes
// one full clock cycle to cross four zones. This module models that with
// CLOCK_ZONES registers in series on a "zone clock" that has one rising
// edge per clock phase: d appears on q CLOCK_ZONES zone-clock edges later,
// that is one QCA clock cycle for the default of four zones. A new word may
// enter on every edge.
//
// The register-per-phase abstraction and the asynchronous active-low reset
// (clearing every zone to 0) are choices of this model; a QCA circuit has
// no reset.
module qca_zone_pipe #(
  parameter int unsigned WIDTH       = 4,
  parameter int unsigned CLOCK_ZONES = 4
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);

  if (CLOCK_ZONES < 1) begin : g_bad_zones
    $error("qca_zone_pipe: CLOCK_ZONES must be at least 1");
  end

  logic [WIDTH-1:0] zone [CLOCK_ZONES];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < CLOCK_ZONES; i++) zone[i] <= '0;
    end else begin
      zone[0] <= d;
      for (int i = 1; i < CLOCK_ZONES; i++) zone[i] <= zone[i-1];
    end
  end

  assign q = zone[CLOCK_ZONES-1];

endmodule
