// tb_rca: exhaustive self-check of the 4-bit ripple carry adder (all a, b
// and carry-in values) and a random check of a 13-bit instance.
module tb_rca;
  logic [3:0]  a, b, s;
  logic        cin, cout;
  logic [12:0] wa, wb, ws;
  logic        wcin, wcout;
  int checks = 0, failures = 0;

  rca dut (.a(a), .b(b), .cin(cin), .sum(s), .cout(cout));
  rca #(.WIDTH(13)) dut13 (.a(wa), .b(wb), .cin(wcin), .sum(ws), .cout(wcout));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 16; i++)
      for (int j = 0; j < 16; j++)
        for (int c = 0; c < 2; c++) begin
          a = 4'(i); b = 4'(j); cin = 1'(c);
          #1;
          checks++;
          if ({cout, s} !== 5'(i + j + c)) begin
            failures++;
            $display("FAIL %0d + %0d + %0d got %0d", i, j, c, {cout, s});
          end
        end
    for (int n = 0; n < 2000; n++) begin
      wa = 13'($urandom); wb = 13'($urandom); wcin = 1'($urandom);
      #1;
      checks++;
      if ({wcout, ws} !== 14'({1'b0, wa} + {1'b0, wb} + 14'(wcin))) begin
        failures++;
        $display("FAIL 13-bit %0d + %0d + %0d got %0d", wa, wb, wcin, {wcout, ws});
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
