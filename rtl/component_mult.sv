// Component multiplier of the partition multiplier: an unsigned R x R array
// multiplier.
//
// Each row of the array is the multiplicand gated by one multiplier bit and
// shifted to that bit's weight; the rows are summed one after the other, as
// in a plain carry-propagate array. The partition multiplier leaves the choice
// of component multiplier to the application; an array multiplier, the
// cheapest and slowest choice, is this design's own pick.
//
// Interface: a, b are R-bit unsigned operands, p = a * b (2R bits).
// Timing: purely combinational.
module component_mult #(
  parameter int unsigned R = 8   // segment width r
) (
  input  logic [R-1:0]   a,
  input  logic [R-1:0]   b,
  output logic [2*R-1:0] p
);

  always_comb begin
    logic [2*R-1:0] acc;
    acc = '0;
    for (int unsigned i = 0; i < R; i++) begin
      if (b[i]) acc = acc + ({{R{1'b0}}, a} << i);
    end
    p = acc;
  end

endmodule
