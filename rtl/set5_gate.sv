// set5_gate: set-5 of a comparator module, the bus drivers.
//
// Gates the operand bits by the set-4 select: left[k] = s4[k] & A[k] and
// right[k] = s4[k] & B[k]. Since s4 selects at most the single most
// significant differing bit, exactly one of left/right is 1 there when the
// module decides (left: A > B, right: A < B) and both buses stay 0
// elsewhere. Plain AND gates take the place of the transmission-gate
// multiplexer of earlier designs of this comparator. The assignment of A
// to the left bus and B to the right bus follows the original set-5
// element; the AND-gate form is the published design's. Purely combinational.
module set5_gate #(
  parameter int unsigned G = cmp_pkg::GROUP
) (
  input  logic [G-1:0] s4,
  input  logic [G-1:0] a,
  input  logic [G-1:0] b,
  output logic [G-1:0] left,
  output logic [G-1:0] right
);
  always_comb begin
    left  = s4 & a;
    right = s4 & b;
  end
endmodule
