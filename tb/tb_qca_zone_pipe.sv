// Self-checking testbench for qca_zone_pipe at its default size (4-bit
// words, four zones).
//
// After reset the output must read 0 for the first four edges. Then a new
// random word enters on every zone-clock edge and each must leave exactly
// four edges later, unchanged. A second reset in mid-stream must clear
// every zone at once. The expected words come from a queue kept by the
// testbench.
module tb_qca_zone_pipe;
  localparam int unsigned WIDTH = 4;
  localparam int unsigned ZONES = 4;

  logic             clk;
  logic             rst_n;
  logic [WIDTH-1:0] d;
  logic [WIDTH-1:0] q;
  int checks = 0, failures = 0;

  qca_zone_pipe dut (.clk(clk), .rst_n(rst_n), .d(d), .q(q));

  initial begin
    clk = 1'b0;
    forever #5 clk = ~clk;
  end

  initial begin : watchdog
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [WIDTH-1:0] sent [$];

  task automatic check(logic [WIDTH-1:0] exp, string what);
    checks++;
    if (q !== exp) begin
      failures++;
      $display("FAIL %s: q=%h expected %h at %0t", what, q, exp, $time);
    end
  endtask

  initial begin
    rst_n = 1'b0;
    d     = 4'hF;
    repeat (2) @(posedge clk);
    #1 check('0, "reset value");
    rst_n = 1'b1;
    // Words enter one per edge; the queue holds ZONES zeros for the reset state.
    for (int i = 0; i < ZONES; i++) sent.push_back('0);
    for (int n = 0; n < 200; n++) begin
      @(negedge clk);
      d = WIDTH'($urandom);
      sent.push_back(d);
      @(posedge clk);
      #1;
      void'(sent.pop_front());
      check(sent[0], "delayed word");
    end
    // Exact latency: a marker word must appear after ZONES edges, not before.
    // The zones are first filled with a different word.
    repeat (ZONES) begin
      @(negedge clk);
      d = 4'h5;
    end
    @(negedge clk);
    d = 4'hA;
    @(posedge clk);
    for (int e = 1; e <= ZONES; e++) begin
      @(negedge clk);
      d = 4'h5;
      checks++;
      if ((q == 4'hA) != (e == ZONES)) begin
        failures++;
        $display("FAIL marker seen=%b after %0d edges", q == 4'hA, e);
      end
      if (e < ZONES) @(posedge clk);
    end
    // Asynchronous reset clears all zones at once.
    #1 rst_n = 1'b0;
    #1 check('0, "asynchronous reset");
    @(posedge clk);
    #1 check('0, "held in reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
