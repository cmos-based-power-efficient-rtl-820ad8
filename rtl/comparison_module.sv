// comparison_module: the comparing stage, N/G chained G-bit modules.
//
// Module k handles bits G*k+G-1 .. G*k; module N/G-1 holds the MSBs. The
// enable ripples from the most significant module downward: en[N/G] = 1
// enters the top module and each module passes en_in & (its bits equal) to
// the next lower one. Once a module meets a difference, all lower modules
// are disabled and drive 0, so both N-bit buses carry at most a single 1:
// at the most significant differing bit, on left_bus when A is 1 there and
// on right_bus when B is. en[0] = 1 means all N bits are equal.
// en is brought out so the point where the comparison stops can be seen;
// en[N/G] is the constant 1 that enters the top module.
// Purely combinational.
module comparison_module #(
  parameter int unsigned N = 128,
  parameter int unsigned G = cmp_pkg::GROUP
) (
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  output logic [N-1:0]   left_bus,
  output logic [N-1:0]   right_bus,
  output logic [N/G:0]   en
);
  localparam int unsigned M = N / G;

  if (N % G != 0) begin : g_bad_width
    $error("comparison_module: N must be a multiple of G");
  end

  assign en[M] = 1'b1;

  for (genvar k = 0; k < M; k++) begin : g_mod
    cmp4_module #(.G(G)) u_cmp (
      .a      (a[G*k +: G]),
      .b      (b[G*k +: G]),
      .en_in  (en[k+1]),
      .left   (left_bus[G*k +: G]),
      .right  (right_bus[G*k +: G]),
      .en_out (en[k])
    );
  end
endmodule
