// Two-input OR gate built the QCA way: a three-input majority voter whose
// third input is a fixed cell polarised to +1, i.e. logic 1.
//
// Maj(a, b, 1) = a | b. The gate is combinational with no delay; it
// instantiates qca_maj3 so that the converter is made of majority gates
// only, as in a QCA layout.
module qca_or2 (
  input  logic a,
  input  logic b,
  output logic y
);

  qca_maj3 u_maj (
    .a (a),
    .b (b),
    .c (1'b1),
    .y (y)
  );

endmodule
