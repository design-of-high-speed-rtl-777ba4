// tb_vedic4x4: exhaustive self-check of the 4x4 Vedic multiplier. All 256
// operand pairs are compared with a * b. It also counts the operand pairs
// for which each of the two carries ORed into the third adder is 1, and
// fails if either never occurs.
module tb_vedic4x4;
  logic [3:0] a, b;
  logic [7:0] p;
  int checks = 0, failures = 0;
  int n_c1 = 0, n_c2 = 0;

  vedic4x4 dut (.a(a), .b(b), .p(p));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int q0, q1, q2, mid;
    for (int i = 0; i < 16; i++) begin
      for (int j = 0; j < 16; j++) begin
        a = 4'(i);
        b = 4'(j);
        #1;
        checks++;
        if (p !== 8'(i * j)) begin
          failures++;
          $display("FAIL %0d * %0d = %0d, got %0d", i, j, i * j, p);
        end
        q0  = (i % 4) * (j % 4);
        q1  = (i / 4) * (j % 4);
        q2  = (i % 4) * (j / 4);
        mid = q1 + q2;
        if (mid >= 16) n_c1++;
        if ((mid % 16) + q0 / 4 >= 16) n_c2++;
      end
    end
    checks += 2;
    if (n_c1 == 0) failures++;
    if (n_c2 == 0) failures++;
    $display("carry of adder 1 set %0d times, of adder 2 %0d times", n_c1, n_c2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
