// Self-checking testbench for bcd_xs3_core.
//
// All sixteen 4-bit inputs are applied. For the ten BCD digits the output
// must equal digit + 3 (the definition of Excess-3) and must also match
// the Excess-3 table entry written out below. For the six non-BCD codes
// the output must match the reduced equations in their XOR/XNOR form:
// Z = !D, Y = C XNOR D, X = B XOR (C OR D), W = A OR (B AND (C OR D)).
module tb_bcd_xs3_core;
  import bcd_xs3_pkg::*;

  bcd_t bcd;
  xs3_t xs3;
  int checks = 0, failures = 0;

  // Excess-3 codes of the digits 0..9.
  localparam logic [3:0] XS3_TABLE [10] = '{
    4'b0011, 4'b0100, 4'b0101, 4'b0110, 4'b0111,
    4'b1000, 4'b1001, 4'b1010, 4'b1011, 4'b1100
  };

  bcd_xs3_core dut (.bcd(bcd), .xs3(xs3));

  function automatic logic [3:0] reduced(logic [3:0] v);
    logic a, b, c, d;
    {a, b, c, d} = v;
    return {a | (b & (c | d)), b ^ (c | d), ~(c ^ d), ~d};
  endfunction

  initial begin : watchdog
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      bcd = bcd_t'(4'(v));
      #1;
      if (v < 10) begin
        checks++;
        if (xs3 !== xs3_t'(4'(v + 3))) begin
          failures++;
          $display("FAIL digit %0d: got %b, expected %b", v, xs3, 4'(v + 3));
        end
        checks++;
        if (xs3 !== xs3_t'(XS3_TABLE[v])) begin
          failures++;
          $display("FAIL digit %0d: got %b, table %b", v, xs3, XS3_TABLE[v]);
        end
      end
      checks++;
      if (xs3 !== xs3_t'(reduced(4'(v)))) begin
        failures++;
        $display("FAIL code %b: got %b, equations give %b", 4'(v), xs3, reduced(4'(v)));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
