// Self-checking testbench for qca_or2: applies all four input
// combinations and compares the output with a 2-input OR.
module tb_qca_or2;
  logic a, b, y;
  int checks = 0, failures = 0;

  qca_or2 dut (.a(a), .b(b), .y(y));

  initial begin : watchdog
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 4; v++) begin
      {a, b} = 2'(v);
      #1;
      checks++;
      if (y !== (a | b)) begin
        failures++;
        $display("FAIL or2(%b,%b) = %b", a, b, y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
