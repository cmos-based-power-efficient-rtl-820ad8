// decision_module: the decision-making stage, a radix-4 OR tree.
//
// Each level groups four bits of the left bus and four of the right bus in a
// sub_decision node; levels repeat until at most four bits per bus are left,
// which the decision_final node turns into gt / eq / lt. For N = 128 the
// buses shrink 128 -> 32 -> 8 -> 2, as in the published tree. When a
// level's width is not a multiple of four (other N, this design's own
// generalisation) the missing inputs of its last node are tied to 0. The design
// relies on the comparison stage placing at most one 1 on the buses, so the
// outputs are one-hot. Purely combinational.
module decision_module #(
  parameter int unsigned N = 128,
  parameter int unsigned G = cmp_pkg::DEC_RADIX
) (
  input  logic [N-1:0] left_bus,
  input  logic [N-1:0] right_bus,
  output logic         gt,
  output logic         eq,
  output logic         lt
);
  import cmp_pkg::dec_levels;
  import cmp_pkg::dec_width;

  localparam int unsigned LEVELS = dec_levels(N);
  localparam int unsigned KFIN   = dec_width(N, LEVELS);

  for (genvar lv = 0; lv < LEVELS; lv++) begin : g_lvl
    localparam int unsigned WI = dec_width(N, lv);
    localparam int unsigned WO = dec_width(N, lv + 1);

    logic [WO*G-1:0] l_i, r_i;  // this level's inputs, padded to WO nodes
    logic [WO-1:0]   l_o, r_o;  // one bit per node and bus

    if (lv == 0) begin : g_src
      always_comb begin
        l_i = '0;
        r_i = '0;
        l_i[WI-1:0] = left_bus;
        r_i[WI-1:0] = right_bus;
      end
    end else begin : g_src
      always_comb begin
        l_i = '0;
        r_i = '0;
        l_i[WI-1:0] = g_lvl[lv-1].l_o;
        r_i[WI-1:0] = g_lvl[lv-1].r_o;
      end
    end

    for (genvar j = 0; j < WO; j++) begin : g_node
      sub_decision #(.G(G)) u_node (
        .l_in  (l_i[G*j +: G]),
        .r_in  (r_i[G*j +: G]),
        .l_out (l_o[j]),
        .r_out (r_o[j])
      );
    end
  end

  logic [KFIN-1:0] fin_l, fin_r;
  if (LEVELS == 0) begin : g_fin
    assign fin_l = left_bus;
    assign fin_r = right_bus;
  end else begin : g_fin
    assign fin_l = g_lvl[LEVELS-1].l_o;
    assign fin_r = g_lvl[LEVELS-1].r_o;
  end

  decision_final #(.K(KFIN)) u_final (
    .l_in (fin_l),
    .r_in (fin_r),
    .gt   (gt),
    .eq   (eq),
    .lt   (lt)
  );
endmodule
