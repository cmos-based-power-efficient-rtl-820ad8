// cmp4_module: one G-bit (4-bit) comparator module of the comparison stage.
//
// Five sets in series:
//   set-1  D = A xor B                         (bit differs)
//   set-2  S2 = nor(D)                         (all G bits equal)
//   set-3  en_out = en_in & S2                 (enable for the lower module)
//   set-4  S4 = one-hot MSB-first select of D, gated by en_in
//   set-5  left = S4 & A, right = S4 & B       (bus bits)
// en_in is 1 only when every more significant bit of the operands is equal.
// A disabled module drives 0 on all its bus bits. The five-set split is the
// published one; the module has no local gt/eq/lt outputs, since the shared
// decision tree makes the decision. At most one of the 2G
// outputs is 1: the left bit of the most significant differing position if
// A is 1 there, the right bit if B is. Purely combinational.
module cmp4_module #(
  parameter int unsigned G = cmp_pkg::GROUP
) (
  input  logic [G-1:0] a,
  input  logic [G-1:0] b,
  input  logic         en_in,
  output logic [G-1:0] left,
  output logic [G-1:0] right,
  output logic         en_out
);
  logic [G-1:0] d;
  logic         s2;
  logic [G-1:0] s4;

  set1_xor      #(.G(G)) u_set1 (.a(a), .b(b), .d(d));
  set2_nor      #(.G(G)) u_set2 (.d(d), .s2(s2));
  set3_and               u_set3 (.s3_prev(en_in), .s2(s2), .s3(en_out));
  set4_priority #(.G(G)) u_set4 (.en(en_in), .d(d), .s4(s4));
  set5_gate     #(.G(G)) u_set5 (.s4(s4), .a(a), .b(b), .left(left), .right(right));
endmodule
