// BCD-to-Excess-3 code converter as a clocked QCA circuit.
//
// A BCD digit {a,b,c,d} is turned into its Excess-3 code {w,x,y,z}
// (digit + 3) by the majority-gate network of bcd_xs3_core, and the result
// is carried through CLOCK_ZONES QCA clock zones by qca_zone_pipe. With the
// default of four zones the code leaves the converter one full QCA clock
// cycle after the digit was applied, which is the delay of the QCA layout
// this models.
//
// Interface: clk is the zone clock, one rising edge per QCA clock phase
// (four per QCA clock cycle); rst_n is an active-low asynchronous reset
// that clears the zones, so xs3 reads 0000 until the first digit has
// crossed them. bcd is sampled on every zone-clock edge and xs3 shows the
// code of the digit sampled CLOCK_ZONES edges earlier. Inputs 1010-1111 are
// not BCD; their outputs are whatever the gate network gives.
//
// The gate network and the four-zone, one-cycle delay follow the published
// design. Evaluating all the logic before the first zone register (rather
// than spreading gates over zones) and the reset are choices of this model.
module bcd_xs3_qca
  import bcd_xs3_pkg::*;
#(
  // Clock zones crossed in one QCA clock cycle (switch, hold, release, relax).
  parameter int unsigned CLOCK_ZONES = 4
) (
  input  logic clk,
  input  logic rst_n,
  input  bcd_t bcd,
  output xs3_t xs3
);

  xs3_t xs3_comb;

  bcd_xs3_core u_core (
    .bcd (bcd),
    .xs3 (xs3_comb)
  );

  qca_zone_pipe #(
    .WIDTH       ($bits(xs3_t)),
    .CLOCK_ZONES (CLOCK_ZONES)
  ) u_zones (
    .clk   (clk),
    .rst_n (rst_n),
    .d     (xs3_comb),
    .q     (xs3)
  );

endmodule
