// tb_d_latch: self-check of an 8-bit D latch. While en is 1, q must follow
// every change of d at once; after en falls, q must keep the last value and
// ignore d; when en rises again q takes the present d.
module tb_d_latch;
  logic       en;
  logic [7:0] d, q, held;
  int checks = 0, failures = 0;

  d_latch #(.WIDTH(8)) dut (.en(en), .d(d), .q(q));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_q(input logic [7:0] v, input string what);
    checks++;
    if (q !== v) begin
      failures++;
      $display("FAIL %s: q=%h expected %h", what, q, v);
    end
  endtask

  initial begin
    en = 1'b0;
    d  = 8'h00;
    #1;
    for (int n = 0; n < 500; n++) begin
      en = 1'b1;
      for (int k = 0; k < 3; k++) begin
        d = 8'($urandom);
        #1;
        expect_q(d, "transparent");
      end
      held = d;
      en = 1'b0;
      #1;
      expect_q(held, "hold at fall");
      for (int k = 0; k < 3; k++) begin
        d = 8'($urandom);
        if (d == held) d = ~held;
        #1;
        expect_q(held, "hold");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
