// tb_vedic8x8: exhaustive self-check of the 8x8 Vedic multiplier, including
// its latency. Each of the 65536 operand pairs is applied in the low clock
// phase and held for VEDIC8_LATENCY + 1 clock cycles. The product is sampled
// in the low phase of every cycle; the cycle from which it is correct and
// stays correct is recorded. Every pair must be correct by cycle
// VEDIC8_LATENCY and remain so through the extra cycle, and the worst case
// over all pairs must be exactly VEDIC8_LATENCY.
module tb_vedic8x8;
  import vedic_pkg::*;
  localparam int unsigned LAT = VEDIC8_LATENCY;
  logic        clk;
  logic [7:0]  a, b;
  logic [15:0] p;
  int checks = 0, failures = 0;
  int worst = 0;

  vedic8x8 dut (.clk(clk), .a(a), .b(b), .p(p));

  initial begin
    #100000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int first_ok;
    logic [15:0] expected;
    clk = 1'b0;
    for (int i = 0; i < 256; i++) begin
      for (int j = 0; j < 256; j++) begin
        a = 8'(i);
        b = 8'(j);
        expected = 16'(i * j);
        first_ok = 0;
        for (int cyc = 1; cyc <= LAT + 1; cyc++) begin
          #1 clk = 1'b1;
          #5 clk = 1'b0;
          #2;
          if (p === expected) begin
            if (first_ok == 0) first_ok = cyc;
          end else begin
            first_ok = 0;
          end
        end
        checks++;
        if (first_ok == 0 || first_ok > LAT) begin
          failures++;
          if (failures < 10)
            $display("FAIL %0d * %0d = %0d, got %0d (settled at cycle %0d)",
                     i, j, expected, p, first_ok);
        end
        if (first_ok > worst) worst = first_ok;
      end
    end
    checks++;
    if (worst != LAT) begin
      failures++;
      $display("FAIL worst-case latency %0d, expected %0d", worst, LAT);
    end
    $display("worst-case latency %0d cycles", worst);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
