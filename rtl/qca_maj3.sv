// Three-input majority voter (MV), the basic gate of quantum-dot cellular
// automata (QCA) logic.
//
// The output is 1 when at least two of the three inputs are 1:
// y = ab + bc + ca. In a QCA layout this is the central "device cell"
// that settles to the polarisation held by most of its three neighbours;
// here it is plain combinational logic with no delay.
module qca_maj3 (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic y
);

  always_comb y = (a & b) | (b & c) | (c & a);

endmodule
