// tb_vedic16x16: end-to-end self-check of the 16x16 Vedic multiplier at its
// default (and only) size.
//
// Operand pairs (corner cases, then random) are applied in the low clock
// phase and held for VEDIC16_LATENCY + 1 clock cycles. The product is
// sampled in the low phase of every cycle and once more in a high phase at
// the end; it must equal a * b from cycle VEDIC16_LATENCY on, and the worst
// case over all pairs must be exactly VEDIC16_LATENCY cycles.
//
// The mechanisms of the design are counted from the operands, by a model
// independent of the RTL, and each must occur: a carry entering an upper
// group of the first top-level adder (latched carry-in-1 result chosen) and
// not entering it (live carry-in-0 result chosen), a carry out of the first
// top-level adder (c1) and of the second (c2), which are ORed into the
// third.
module tb_vedic16x16;
  import vedic_pkg::*;
  localparam int unsigned LAT = VEDIC16_LATENCY;
  localparam int unsigned NG  = csla_num_groups(16);
  localparam int unsigned NVEC = 20000;
  logic        clk;
  logic [15:0] a, b;
  logic [31:0] p;
  int checks = 0, failures = 0;
  int worst = 0;
  int n_latched = 0, n_live = 0, n_c1 = 0, n_c2 = 0;

  vedic16x16 dut (.clk(clk), .a(a), .b(b), .p(p));

  initial begin
    #100000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Mechanism counts for one operand pair, from the partial products.
  task automatic count_mechanisms(input logic [15:0] x, input logic [15:0] y);
    int unsigned q0, q1, q2, s1, lsb, mask;
    q0 = int'(x[7:0])  * int'(y[7:0]);
    q1 = int'(x[15:8]) * int'(y[7:0]);
    q2 = int'(x[7:0])  * int'(y[15:8]);
    if (q1 + q2 >= 65536) n_c1++;
    s1 = (q1 + q2) % 65536;
    if (s1 + q0 / 256 >= 65536) n_c2++;
    for (int k = 1; k < NG; k++) begin
      lsb  = csla_group_lsb(16, k);
      mask = (1 << lsb) - 1;
      if (((q1 & mask) + (q2 & mask)) >> lsb != 0) n_latched++;
      else n_live++;
    end
  endtask

  task automatic run(input logic [15:0] x, input logic [15:0] y);
    int first_ok;
    logic [31:0] expected;
    a = x;
    b = y;
    expected = 32'(x) * 32'(y);
    count_mechanisms(x, y);
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
    #1 clk = 1'b1;
    #2;
    if (p !== expected) first_ok = 0;
    #3 clk = 1'b0;
    #2;
    checks++;
    if (first_ok == 0 || first_ok > LAT) begin
      failures++;
      if (failures < 10)
        $display("FAIL %0d * %0d = %0d, got %0d (settled at cycle %0d)",
                 x, y, expected, p, first_ok);
    end
    if (first_ok > worst) worst = first_ok;
  endtask

  task automatic require(input int count, input string what);
    checks++;
    $display("%-40s %0d", what, count);
    if (count == 0) begin
      failures++;
      $display("FAIL mechanism never exercised: %s", what);
    end
  endtask

  initial begin
    clk = 1'b0;
    run(16'h0000, 16'h0000);
    run(16'hffff, 16'hffff);
    run(16'hffff, 16'h0001);
    run(16'h0001, 16'hffff);
    run(16'h00ff, 16'hff00);
    run(16'hff00, 16'h00ff);
    run(16'h8000, 16'h8000);
    run(16'hffff, 16'h0000);
    for (int n = 0; n < NVEC; n++) run(16'($urandom), 16'($urandom));
    checks++;
    if (worst != LAT) begin
      failures++;
      $display("FAIL worst-case latency %0d, expected %0d", worst, LAT);
    end
    $display("worst-case latency %0d cycles", worst);
    require(n_latched, "group picks latched carry-in-1 result");
    require(n_live,    "group picks live carry-in-0 result");
    require(n_c1,      "carry out of adder 1 (c1)");
    require(n_c2,      "carry out of adder 2 (c2)");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
