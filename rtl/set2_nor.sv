// set2_nor: set-2 of a comparator module, the "all bits equal" detector.
//
// A G-input NOR of the set-1 outputs: s2 = 1 when the G bits of A and B are
// identical, so the comparison may continue into lower-order modules; s2 = 0
// when this module can already decide the result. Purely combinational.
module set2_nor #(
  parameter int unsigned G = cmp_pkg::GROUP
) (
  input  logic [G-1:0] d,
  output logic         s2
);
  always_comb s2 = ~(|d);
endmodule
