// QCA inverter: the output is the complement of the input.
//
// In a QCA layout the inversion comes from cells placed at 45 degrees to
// the incoming wire, which take the opposite polarisation. Only the logic
// function is modelled here; it is combinational with no delay.
module qca_inv (
  input  logic a,
  output logic y
);

  always_comb y = ~a;

endmodule
