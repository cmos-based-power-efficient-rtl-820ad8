// prefix_comparator_tb: end-to-end test of the comparator at its default
// width (128 bits, no parameter override).
//
// Results are checked against the unsigned relational operators. The test
// also counts how often each behaviour of the design occurs and fails if
// one never does:
//   - each of the three outcomes A > B, A = B, A < B;
//   - a decision taken in every one of the 32 four-bit modules;
//   - an early abort: a decision in a higher module that disables all the
//     modules below it (seen on the internal enable chain);
//   - the worst case, where every module is enabled (all upper bits equal,
//     decided in the lowest module or not at all).
// It also checks that at most one bus bit is set and that the first module
// with a difference is the one the enable chain stops at.
module prefix_comparator_tb;
  localparam int N = 128;
  localparam int G = 4;
  localparam int M = N / G;

  logic [N-1:0] a, b;
  logic         gt, eq, lt;
  int checks = 0, failures = 0;
  int n_gt = 0, n_eq = 0, n_lt = 0, n_abort = 0, n_worst = 0;
  int n_decided_in [M];

  prefix_comparator dut (.a(a), .b(b), .agb(gt), .aeb(eq), .alb(lt));

  initial begin : watchdog
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [N-1:0] rnd();
    return {$urandom, $urandom, $urandom, $urandom};
  endfunction

  task automatic apply();
    int p, mod;
    #1;
    checks += 4;
    if (gt !== (a > b))  begin failures++; $display("FAIL gt a=%h b=%h", a, b); end
    if (lt !== (a < b))  begin failures++; $display("FAIL lt a=%h b=%h", a, b); end
    if (eq !== (a == b)) begin failures++; $display("FAIL eq a=%h b=%h", a, b); end
    if ($countones({dut.left_bus, dut.right_bus}) > 1) begin
      failures++; $display("FAIL more than one bus bit set a=%h b=%h", a, b);
    end
    // where the decision falls and how far the enable got
    p = -1;
    for (int k = 0; k < N; k++) if (a[k] != b[k]) p = k;
    if (p >= 0) begin
      mod = p / G;
      n_decided_in[mod]++;
      checks++;
      if (dut.u_compare.en[mod+1] !== 1'b1 || dut.u_compare.en[mod] !== 1'b0) begin
        failures++; $display("FAIL enable chain stops in wrong module a=%h b=%h en=%b", a, b, dut.u_compare.en);
      end
      if (mod > 0) begin
        bit lower_off = 1'b1;
        for (int k = 0; k < mod; k++) if (dut.u_compare.en[k]) lower_off = 1'b0;
        if (lower_off) n_abort++;
      end
    end
    if (dut.u_compare.en[1] === 1'b1) n_worst++;
    if (gt) n_gt++;
    if (eq) n_eq++;
    if (lt) n_lt++;
  endtask

  initial begin
    foreach (n_decided_in[i]) n_decided_in[i] = 0;
    // equal operands: every module is enabled
    a = '0; b = '0; apply();
    a = '1; b = '1; apply();
    for (int r = 0; r < 16; r++) begin a = rnd(); b = a; apply(); end
    // worst case: all upper bits low, only the LSB set in one operand
    a = N'(1); b = '0; apply();
    a = '0; b = N'(1); apply();
    // a decision at every bit position, in both directions
    for (int p = 0; p < N; p++)
      for (int r = 0; r < 2; r++) begin
        a = rnd();
        b = rnd();
        for (int k = p + 1; k < N; k++) b[k] = a[k];
        b[p] = ~a[p];
        apply();
        {a, b} = {b, a};
        apply();
      end
    // random operands
    for (int r = 0; r < 1000; r++) begin a = rnd(); b = rnd(); apply(); end

    $display("outcomes: gt=%0d eq=%0d lt=%0d, early aborts=%0d, all-modules-enabled=%0d",
             n_gt, n_eq, n_lt, n_abort, n_worst);
    checks += 5;
    if (n_gt == 0)    begin failures++; $display("FAIL A > B never seen"); end
    if (n_eq == 0)    begin failures++; $display("FAIL A = B never seen"); end
    if (n_lt == 0)    begin failures++; $display("FAIL A < B never seen"); end
    if (n_abort == 0) begin failures++; $display("FAIL early abort never seen"); end
    if (n_worst == 0) begin failures++; $display("FAIL worst case never seen"); end
    for (int m = 0; m < M; m++) begin
      checks++;
      if (n_decided_in[m] == 0) begin failures++; $display("FAIL no decision in module %0d", m); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
