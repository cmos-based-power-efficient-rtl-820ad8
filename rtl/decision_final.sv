// decision_final: the last node of the decision tree.
//
// ORs the K remaining bits of each bus and encodes the result:
//   left set  -> gt (A > B)
//   right set -> lt (A < B)
//   neither   -> eq (A = B)
// K = 2 for a 128-bit comparator (128 -> 32 -> 8 -> 2 bits per bus).
// Purely combinational.
module decision_final #(
  parameter int unsigned K = 2
) (
  input  logic [K-1:0] l_in,
  input  logic [K-1:0] r_in,
  output logic         gt,
  output logic         eq,
  output logic         lt
);
  always_comb begin
    gt = |l_in;
    lt = |r_in;
    eq = ~(gt | lt);
  end
endmodule
