// End-to-end testbench for bcd_xs3_qca at its default parameters (four
// clock zones).
//
// Phase 1 follows the usual simulation of this converter: the BCD digits
// 0..9 are applied in counting order, each held for one QCA clock cycle
// (four zone-clock edges), and every code must appear exactly one QCA
// clock cycle after its digit was applied, not an edge earlier.
// Phase 2 streams a random code (BCD or not) on every zone-clock edge;
// each result must come out four edges later. Phase 3 applies a reset in
// mid-stream. The expected codes are digit + 3 for BCD digits and the
// reduced XOR/XNOR form of the equations for the six non-BCD codes.
//
// Counted events, each of which must happen at least once: a BCD digit
// converted (all ten digits must be seen), a non-BCD (don't-care) code
// converted, the exact one-cycle latency observed, a reset clearing the
// zones.
module tb_bcd_xs3_qca;
  import bcd_xs3_pkg::*;

  localparam int unsigned ZONES = 4;  // four clock zones per QCA clock cycle

  logic clk;
  logic rst_n;
  bcd_t bcd;
  xs3_t xs3;
  int checks = 0, failures = 0;

  int n_digit = 0, n_dont_care = 0, n_latency = 0, n_reset = 0;
  bit [9:0] digit_seen = '0;

  bcd_xs3_qca dut (.clk(clk), .rst_n(rst_n), .bcd(bcd), .xs3(xs3));

  initial begin
    clk = 1'b0;
    forever #5 clk = ~clk;
  end

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic xs3_t expected(bcd_t v);
    if (v < 4'd10) return xs3_t'(4'(v) + 4'd3);
    return xs3_t'({v.a | (v.b & (v.c | v.d)), v.b ^ (v.c | v.d), ~(v.c ^ v.d), ~v.d});
  endfunction

  task automatic check(xs3_t exp, string what);
    checks++;
    if (xs3 !== exp) begin
      failures++;
      $display("FAIL %s: xs3=%b expected %b at %0t", what, xs3, exp, $time);
    end
  endtask

  task automatic count_code(bcd_t v);
    if (v < 4'd10) begin
      n_digit++;
      digit_seen[v] = 1'b1;
    end else begin
      n_dont_care++;
    end
  endtask

  bcd_t sent [$];

  initial begin
    rst_n = 1'b0;
    bcd   = bcd_t'(4'd0);
    repeat (2) @(posedge clk);
    #1 check('0, "reset value");
    @(negedge clk);
    rst_n = 1'b1;

    // Phase 1: counting 0..9, one digit per QCA clock cycle.
    for (int v = 0; v < 10; v++) begin
      bcd = bcd_t'(4'(v));
      for (int e = 1; e <= ZONES; e++) begin
        @(posedge clk);
        @(negedge clk);
        if (e < ZONES) begin
          // The previous digit's code must still be showing.
          if (v > 0) check(expected(bcd_t'(4'(v - 1))), "before one clock cycle");
        end else begin
          check(expected(bcd_t'(4'(v))), "after one clock cycle");
          if (xs3 === expected(bcd_t'(4'(v)))) begin
            count_code(bcd_t'(4'(v)));
            if (v > 0 && expected(bcd_t'(4'(v))) != expected(bcd_t'(4'(v - 1))))
              n_latency++;
          end
        end
      end
    end

    // Phase 2: a new code on every zone-clock edge, all 16 codes possible.
    for (int i = 0; i < ZONES; i++) sent.push_back(bcd);
    for (int n = 0; n < 400; n++) begin
      bcd = bcd_t'(4'($urandom));
      sent.push_back(bcd);
      @(posedge clk);
      @(negedge clk);
      void'(sent.pop_front());
      check(expected(sent[0]), "streamed code");
      if (n >= ZONES && xs3 === expected(sent[0])) count_code(sent[0]);
    end

    // Phase 3: reset in mid-stream clears every zone.
    bcd = bcd_t'(4'd9);
    @(posedge clk);
    #1 rst_n = 1'b0;
    #1 check('0, "asynchronous reset");
    if (xs3 === '0) n_reset++;
    @(negedge clk);
    rst_n = 1'b1;
    for (int e = 1; e <= ZONES; e++) begin
      @(posedge clk);
      @(negedge clk);
      check(e < ZONES ? xs3_t'('0) : expected(bcd), "refill after reset");
    end

    $display("events: digits=%0d dont_care=%0d latency=%0d reset=%0d digits_seen=%b",
             n_digit, n_dont_care, n_latency, n_reset, digit_seen);
    checks++;
    if (digit_seen != '1) begin
      failures++;
      $display("FAIL not every BCD digit was converted");
    end
    checks++;
    if (n_dont_care == 0) begin
      failures++;
      $display("FAIL no don't-care code was converted");
    end
    checks++;
    if (n_latency == 0) begin
      failures++;
      $display("FAIL one-cycle latency never observed");
    end
    checks++;
    if (n_reset == 0) begin
      failures++;
      $display("FAIL reset never cleared the zones");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
