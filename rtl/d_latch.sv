// d_latch: WIDTH-bit level-sensitive D latch.
//
// While en is 1 the latch is transparent (q follows d); while en is 0 it
// holds the value d had when en fell. In the carry select adder en is the
// clock, so the latches capture the carry-in-1 result during the high phase
// and hold it through the low phase. There is no reset: every enable phase
// rewrites the content. Written behaviourally rather than as the gate-level
// latch. The latch this infers is the intended storage element, so latch
// reports from lint and synthesis tools on this module (including a
// "no latches detected" note when en is a clock) are expected and stand.
module d_latch #(
  parameter int unsigned WIDTH = 1
) (
  input  logic             en,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);
  always_latch begin
    if (en) q = d;
  end
endmodule
