// Self-checking testbench for qca_maj3: applies all eight input
// combinations and compares the output with a population count of the
// inputs (1 when two or more are 1).
module tb_qca_maj3;
  logic a, b, c, y;
  int checks = 0, failures = 0;

  qca_maj3 dut (.a(a), .b(b), .c(c), .y(y));

  initial begin : watchdog
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      {a, b, c} = 3'(v);
      #1;
      checks++;
      if (y !== ($countones(3'(v)) >= 2)) begin
        failures++;
        $display("FAIL maj3(%b,%b,%b) = %b", a, b, c, y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
