// tb_csla_dlatch: self-check of the latch-based carry select adder at 16
// bits (groups 2,2,3,4,5) and 8 bits (groups 2,2,4). Operands change in the
// low clock phase; after one full clock cycle the sum must be correct in the
// low phase and must still be correct through the following high phase
// (held by the output latch). Random operands plus carry-chain corner cases
// (all ones plus one, alternating patterns) are used. The number of times a
// carry enters each upper group of the 16-bit adder, so that the latched
// carry-in-1 result is chosen, is counted, and must be non-zero.
module tb_csla_dlatch;
  import vedic_pkg::*;
  logic        clk, cin;
  logic [15:0] a, b, s;
  logic        cout;
  logic [7:0]  a8, b8, s8;
  logic        cout8;
  int checks = 0, failures = 0;
  localparam int unsigned NG = csla_num_groups(16);
  int n_sel [NG];

  csla_dlatch dut (.clk(clk), .a(a), .b(b), .cin(cin), .sum(s), .cout(cout));
  csla_dlatch #(.WIDTH(8)) dut8 (.clk(clk), .a(a8), .b(b8), .cin(cin), .sum(s8), .cout(cout8));

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string phase);
    checks++;
    if ({cout, s} !== 17'({1'b0, a} + {1'b0, b} + 17'(cin))) begin
      failures++;
      $display("FAIL 16-bit %s %h + %h + %0d got %h", phase, a, b, cin, {cout, s});
    end
    checks++;
    if ({cout8, s8} !== 9'({1'b0, a8} + {1'b0, b8} + 9'(cin))) begin
      failures++;
      $display("FAIL 8-bit %s %h + %h + %0d got %h", phase, a8, b8, cin, {cout8, s8});
    end
  endtask

  task automatic run(input logic [15:0] x, input logic [15:0] y, input logic ci);
    int unsigned lsb, mask;
    a = x; b = y; cin = ci;
    a8 = x[7:0]; b8 = y[15:8];
    for (int k = 1; k < NG; k++) begin
      lsb  = csla_group_lsb(16, k);
      mask = (1 << lsb) - 1;
      if (((int'(x) & mask) + (int'(y) & mask) + int'(ci)) >> lsb != 0) n_sel[k]++;
    end
    #2 clk = 1'b1;
    #5 clk = 1'b0;
    #2 check("low");
    #1 clk = 1'b1;
    #2 check("high");
    #3 clk = 1'b0;
    #2;
  endtask

  initial begin
    clk = 1'b0;
    foreach (n_sel[k]) n_sel[k] = 0;
    run(16'hffff, 16'h0001, 1'b0);
    run(16'hffff, 16'h0000, 1'b1);
    run(16'hffff, 16'hffff, 1'b1);
    run(16'h0000, 16'h0000, 1'b0);
    run(16'haaaa, 16'h5555, 1'b1);
    run(16'h7fff, 16'h0001, 1'b0);
    for (int n = 0; n < 5000; n++)
      run(16'($urandom), 16'($urandom), 1'($urandom));
    for (int k = 1; k < NG; k++) begin
      checks++;
      if (n_sel[k] == 0) begin
        failures++;
        $display("FAIL group %0d never selected its latched result", k);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
