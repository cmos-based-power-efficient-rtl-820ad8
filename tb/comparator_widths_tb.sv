// comparator_widths_tb: runs the comparator at the operand widths of the
// power/delay evaluation (16, 32, 64 and 128 bits, and 8 bits) side by side.
//
// For each width it applies the evaluation's worst-case stimulus, where all
// upper bits are 0 and only the LSB of one operand is 1, so that every
// four-bit module is enabled before the decision is taken; equal operands,
// which also enable every module; a difference in the MSB, which aborts
// every lower module; and random operands. Results are checked against the
// unsigned relational operators on the low W bits of shared 128-bit
// stimulus, and the enable chain of each instance is checked to reach (or
// not reach) its lowest module as expected.
module comparator_widths_tb;
  localparam int NW = 5;
  localparam int WIDTHS [NW] = '{8, 16, 32, 64, 128};
  localparam int MAXW = 128;

  logic [MAXW-1:0] a, b;
  logic [NW-1:0]   gt, eq, lt, all_enabled, none_below_top;
  int checks = 0, failures = 0;
  int n_worst [NW];

  for (genvar w = 0; w < NW; w++) begin : g_w
    localparam int W = WIDTHS[w];
    prefix_comparator #(.N(W)) dut (
      .a(a[W-1:0]), .b(b[W-1:0]), .agb(gt[w]), .aeb(eq[w]), .alb(lt[w]));
    // enable into the lowest module; enables below the top module
    assign all_enabled[w]    = dut.u_compare.en[1];
    assign none_below_top[w] = (dut.u_compare.en[W/4-1:0] == '0);
  end

  initial begin : watchdog
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [MAXW-1:0] rnd();
    return {$urandom, $urandom, $urandom, $urandom};
  endfunction

  function automatic logic [MAXW-1:0] low(logic [MAXW-1:0] v, int w);
    // (1 << 128) wraps to 0, so the mask is all ones for the full width
    return v & ((MAXW'(1) << w) - 1'b1);
  endfunction

  task automatic check_results();
    #1;
    for (int w = 0; w < NW; w++) begin
      logic [MAXW-1:0] aw, bw;
      aw = low(a, WIDTHS[w]);
      bw = low(b, WIDTHS[w]);
      checks += 3;
      if (gt[w] !== (aw > bw))  begin failures++; $display("FAIL W=%0d gt a=%h b=%h", WIDTHS[w], aw, bw); end
      if (lt[w] !== (aw < bw))  begin failures++; $display("FAIL W=%0d lt a=%h b=%h", WIDTHS[w], aw, bw); end
      if (eq[w] !== (aw == bw)) begin failures++; $display("FAIL W=%0d eq a=%h b=%h", WIDTHS[w], aw, bw); end
    end
  endtask

  initial begin
    foreach (n_worst[i]) n_worst[i] = 0;
    // worst case: all upper bits 0, only the LSB of one operand 1
    a = MAXW'(1); b = '0;
    check_results();
    for (int w = 0; w < NW; w++) begin
      checks += 2;
      if (!all_enabled[w]) begin failures++; $display("FAIL W=%0d worst case did not enable all modules", WIDTHS[w]); end
      if (gt[w] !== 1'b1)  begin failures++; $display("FAIL W=%0d worst case result", WIDTHS[w]); end
      if (all_enabled[w] && gt[w]) n_worst[w]++;
    end
    {a, b} = {b, a};
    check_results();
    // equal operands: all modules enabled, result equal
    a = rnd(); b = a;
    check_results();
    for (int w = 0; w < NW; w++) begin
      checks++;
      if (!all_enabled[w]) begin failures++; $display("FAIL W=%0d equal operands", WIDTHS[w]); end
    end
    // MSB differs for every width: everything below the top module aborts
    for (int w = 0; w < NW; w++) begin
      a = rnd(); b = a;
      b[WIDTHS[w]-1] = ~a[WIDTHS[w]-1];
      check_results();
      checks++;
      if (!none_below_top[w]) begin failures++; $display("FAIL W=%0d MSB difference did not abort", WIDTHS[w]); end
    end
    for (int r = 0; r < 2000; r++) begin a = rnd(); b = rnd(); check_results(); end
    for (int w = 0; w < NW; w++) begin
      checks++;
      if (n_worst[w] == 0) begin failures++; $display("FAIL W=%0d worst case not reached", WIDTHS[w]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
