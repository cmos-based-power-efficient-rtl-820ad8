// set1_xor: set-1 of a comparator module, the bitwise difference detector.
//
// D_i = A_i xor B_i for each of the G bits. A set D bit marks a position
// where the operands differ; set-2 uses it to decide whether lower-order
// modules may compare at all, and set-4 uses it to find the most
// significant differing bit. Purely combinational.
module set1_xor #(
  parameter int unsigned G = cmp_pkg::GROUP
) (
  input  logic [G-1:0] a,
  input  logic [G-1:0] b,
  output logic [G-1:0] d
);
  always_comb d = a ^ b;
endmodule
