// set3_and: set-3 of a comparator module, the enable-chain AND.
//
// s3 = s3_prev & s2. s3_prev is the enable coming from the next more
// significant module (1 when every higher bit is equal); s2 says this
// module's bits are equal too. The product is the enable handed to the next
// less significant module, so once any module finds a difference every
// lower module is disabled and drives 0 on both buses. Chained over all
// modules this forms the prefix AND of the set-2 outputs from the MSB down.
// The design takes the previous module's set-3 output rather than its set-2
// output as the first factor, because the enable must cover all higher
// modules, not only the adjacent one. Purely combinational.
module set3_and (
  input  logic s3_prev,
  input  logic s2,
  output logic s3
);
  always_comb s3 = s3_prev & s2;
endmodule
