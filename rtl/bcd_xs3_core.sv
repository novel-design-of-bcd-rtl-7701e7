// Combinational BCD-to-Excess-3 code converter made of majority gates.
//
// The Excess-3 code of a decimal digit is the digit plus three. With the
// six unused BCD codes (1010-1111) treated as don't-cares, the four
// outputs reduce to
//   Z = D'
//   Y = CD + (C+D)'          (C XNOR D)
//   X = B'(C+D) + B(C+D)'    (B XOR (C+D))
//   W = A + B(C+D)
// which share the term C+D and its complement. Each AND and OR is a
// majority gate with one input held at 0 or 1, giving eight majority gates
// and three inverters:
//   cd      = Maj(C, D, 0)          c_or_d  = Maj(C, D, 1)
//   nc_or_d = NOT c_or_d            nb      = NOT B
//   Y       = Maj(cd, nc_or_d, 1)
//   b_nsum  = Maj(B, nc_or_d, 0)    nb_sum  = Maj(nb, c_or_d, 0)
//   X       = Maj(nb_sum, b_nsum, 1)
//   b_sum   = Maj(B, c_or_d, 0)     W       = Maj(A, b_sum, 1)
//   Z       = NOT D
// The gate structure follows the published block diagram of this QCA
// converter, including its three inverters (the accompanying prose counts
// two, but D', B' and (C+D)' are all needed). For the don't-care inputs the outputs are whatever these
// equations give (for example 1010 gives 1101); nothing flags them.
//
// Interface: bcd {a,b,c,d} in, xs3 {w,x,y,z} out, no clock, no delay.
module bcd_xs3_core
  import bcd_xs3_pkg::*;
(
  input  bcd_t bcd,
  output xs3_t xs3
);

  logic cd;       // C AND D
  logic c_or_d;   // C OR D
  logic nc_or_d;  // NOT (C OR D)
  logic nb;       // NOT B
  logic b_nsum;   // B AND NOT (C OR D)
  logic nb_sum;   // NOT B AND (C OR D)
  logic b_sum;    // B AND (C OR D)

  // Shared C/D terms.
  qca_and2 u_cd      (.a(bcd.c),  .b(bcd.d),   .y(cd));
  qca_or2  u_c_or_d  (.a(bcd.c),  .b(bcd.d),   .y(c_or_d));
  qca_inv  u_nc_or_d (.a(c_or_d),              .y(nc_or_d));

  // Z = D'
  qca_inv  u_z       (.a(bcd.d),               .y(xs3.z));

  // Y = CD + (C+D)'
  qca_or2  u_y       (.a(cd),     .b(nc_or_d), .y(xs3.y));

  // X = B'(C+D) + B(C+D)'
  qca_inv  u_nb      (.a(bcd.b),               .y(nb));
  qca_and2 u_b_nsum  (.a(bcd.b),  .b(nc_or_d), .y(b_nsum));
  qca_and2 u_nb_sum  (.a(nb),     .b(c_or_d),  .y(nb_sum));
  qca_or2  u_x       (.a(nb_sum), .b(b_nsum),  .y(xs3.x));

  // W = A + B(C+D)
  qca_and2 u_b_sum   (.a(bcd.b),  .b(c_or_d),  .y(b_sum));
  qca_or2  u_w       (.a(bcd.a),  .b(b_sum),   .y(xs3.w));

endmodule
