// sub_decision: one node of the decision OR tree.
//
// ORs G left-bus bits into one and G right-bus bits into one. Because the
// comparison stage puts at most one 1 on the two buses together, the OR of a
// group says whether the deciding bit lies in that group and on which side.
// Purely combinational.
module sub_decision #(
  parameter int unsigned G = cmp_pkg::DEC_RADIX
) (
  input  logic [G-1:0] l_in,
  input  logic [G-1:0] r_in,
  output logic         l_out,
  output logic         r_out
);
  always_comb begin
    l_out = |l_in;
    r_out = |r_in;
  end
endmodule
