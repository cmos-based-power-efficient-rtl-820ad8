// prefix_comparator: N-bit (default 128) magnitude comparator.
//
// Two stages, both purely combinational:
//   comparison_module  N/4 four-bit modules chained MSB-first by an enable;
//                      it places at most one 1 on a left bus (A > B at the
//                      most significant differing bit) or a right bus
//                      (A < B there), and disables every module below the
//                      one that decides.
//   decision_module    radix-4 OR tree over both buses giving agb (A > B),
//                      aeb (A = B) and alb (A < B).
// Exactly one of agb, aeb, alb is 1 for any inputs. Operands are unsigned, bit
// N-1 is the MSB. N must be a multiple of 4; the default of 128 bits and the
// 4-bit module size are those of the published design. The enable chain of
// the comparing stage is kept as an internal signal only (it shows how far
// down the comparison ran) and drives no output.
module prefix_comparator #(
  parameter int unsigned N = 128
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  output logic         agb,   // A > B
  output logic         aeb,   // A = B
  output logic         alb    // A < B
);
  localparam int unsigned G = cmp_pkg::GROUP;

  logic [N-1:0] left_bus;
  logic [N-1:0] right_bus;
  logic [N/G:0] en;

  comparison_module #(.N(N), .G(G)) u_compare (
    .a         (a),
    .b         (b),
    .left_bus  (left_bus),
    .right_bus (right_bus),
    .en        (en)
  );

  decision_module #(.N(N), .G(cmp_pkg::DEC_RADIX)) u_decide (
    .left_bus  (left_bus),
    .right_bus (right_bus),
    .gt        (agb),
    .eq        (aeb),
    .lt        (alb)
  );
endmodule
