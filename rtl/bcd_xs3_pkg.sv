// Types shared by the BCD-to-Excess-3 converter and its testbenches.
//
// A BCD digit is four bits {a,b,c,d}, a being the most significant
// (weight 8). Its Excess-3 code is four bits {w,x,y,z}, w being the most
// significant; the code is the digit plus three. Both structs are packed,
// so a 4-bit literal such as 4'b0101 can be cast straight into them.
// The bit names follow the usual textbook naming of this converter.
package bcd_xs3_pkg;

  typedef struct packed {
    logic a;  // weight 8
    logic b;  // weight 4
    logic c;  // weight 2
    logic d;  // weight 1
  } bcd_t;

  typedef struct packed {
    logic w;  // weight 8
    logic x;  // weight 4
    logic y;  // weight 2
    logic z;  // weight 1
  } xs3_t;

endpackage
