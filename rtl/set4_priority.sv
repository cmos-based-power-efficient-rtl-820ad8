// set4_priority: set-4 of a comparator module, the priority select.
//
// When the module is enabled (en = 1: every more significant bit of A and B
// is equal), s4 marks with a single 1 the most significant position k whose
// set-1 output D_k is 1:  s4[k] = en & D[k] & ~D[j] for every j > k.
// With en = 0 or D = 0, s4 is all zeros. Bit G-1 is the most significant
// bit of the module, so comparison proceeds from the MSB toward the LSB.
// The gate equations follow the original design; which end of the module
// gets priority is fixed here by that MSB-first order.
// Purely combinational.
module set4_priority #(
  parameter int unsigned G = cmp_pkg::GROUP
) (
  input  logic         en,
  input  logic [G-1:0] d,
  output logic [G-1:0] s4
);
  always_comb begin
    logic higher_diff;  // some bit above position k differs
    higher_diff = 1'b0;
    for (int k = int'(G) - 1; k >= 0; k--) begin
      s4[k]       = en & d[k] & ~higher_diff;
      higher_diff = higher_diff | d[k];
    end
  end
endmodule
