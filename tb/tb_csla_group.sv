// tb_csla_group: self-check of a 2-bit and a 5-bit latch-based carry select
// group. For each operand pair a full clock cycle is run (high phase, then
// low phase); in the low phase the output must be a + b + sel, and it must
// stay so while sel is toggled, which selects between the latched
// carry-in-1 result and the carry-in-0 result. Both paths are counted. In
// the following high phase, with sel = 0, the sum must still be a + b: the
// carry-in-0 sum latches hold it while the adder works on carry in 1.
module tb_csla_group;
  logic       clk;
  logic [1:0] a2, b2, s2;
  logic [4:0] a5, b5, s5;
  logic       sel, c2, c5;
  int checks = 0, failures = 0;
  int n_latched = 0, n_live = 0;

  csla_group            dut2 (.clk(clk), .a(a2), .b(b2), .sel(sel), .sum(s2), .cout(c2));
  csla_group #(.WIDTH(5)) dut5 (.clk(clk), .a(a5), .b(b5), .sel(sel), .sum(s5), .cout(c5));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_low();
    checks++;
    if ({c2, s2} !== 3'({1'b0, a2} + {1'b0, b2} + 3'(sel))) begin
      failures++;
      $display("FAIL 2-bit %0d + %0d + %0d got %0d", a2, b2, sel, {c2, s2});
    end
    checks++;
    if ({c5, s5} !== 6'({1'b0, a5} + {1'b0, b5} + 6'(sel))) begin
      failures++;
      $display("FAIL 5-bit %0d + %0d + %0d got %0d", a5, b5, sel, {c5, s5});
    end
    if (sel) n_latched++; else n_live++;
  endtask

  initial begin
    clk = 1'b0;
    sel = 1'b0;
    for (int n = 0; n < 2000; n++) begin
      a2 = 2'($urandom); b2 = 2'($urandom);
      a5 = 5'($urandom); b5 = 5'($urandom);
      sel = 1'($urandom);
      #1 clk = 1'b1;
      #5 clk = 1'b0;
      #1 check_low();
      sel = ~sel;
      #1 check_low();
      sel = ~sel;
      #1 check_low();
      sel = 1'b0;
      #1 clk = 1'b1;
      #2;
      checks++;
      if (s2 !== 2'(a2 + b2) || s5 !== 5'(a5 + b5)) begin
        failures++;
        $display("FAIL high-phase held carry-in-0 sum: %0d %0d", s2, s5);
      end
      #2 clk = 1'b0;
      #1;
    end
    checks += 2;
    if (n_latched == 0) failures++;
    if (n_live == 0) failures++;
    $display("latched path %0d, live path %0d", n_latched, n_live);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
