// decision_module_tb: checks the OR decision tree at N = 128 (levels
// 128 -> 32 -> 8 -> 2) and at N = 20 (20 -> 5 -> 2, whose middle level is
// not a multiple of four). Inputs: both buses zero, a single 1 at every
// position of either bus, and random sparse patterns. gt must equal
// "any left bit", lt "any right bit", eq "no bit at all".
module decision_module_tb;
  localparam int N  = 128;
  localparam int N2 = 20;

  logic [N-1:0]  l, r;
  logic [N2-1:0] l2, r2;
  logic gt, eq, lt, gt2, eq2, lt2;
  int checks = 0, failures = 0;

  decision_module #(.N(N))  dut  (.left_bus(l),  .right_bus(r),  .gt(gt),  .eq(eq),  .lt(lt));
  decision_module #(.N(N2)) dut2 (.left_bus(l2), .right_bus(r2), .gt(gt2), .eq(eq2), .lt(lt2));

  initial begin : watchdog
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply();
    l2 = l[N2-1:0];
    r2 = r[N2-1:0];
    #1;
    checks += 6;
    if (gt !== (l != 0))            begin failures++; $display("FAIL gt l=%h r=%h", l, r); end
    if (lt !== (r != 0))            begin failures++; $display("FAIL lt l=%h r=%h", l, r); end
    if (eq !== (l == 0 && r == 0))  begin failures++; $display("FAIL eq l=%h r=%h", l, r); end
    if (gt2 !== (l2 != 0))          begin failures++; $display("FAIL gt2 l=%h", l2); end
    if (lt2 !== (r2 != 0))          begin failures++; $display("FAIL lt2 r=%h", r2); end
    if (eq2 !== (l2 == 0 && r2 == 0)) begin failures++; $display("FAIL eq2 l=%h r=%h", l2, r2); end
  endtask

  initial begin
    l = '0; r = '0; apply();
    for (int p = 0; p < N; p++) begin
      l = N'(1) << p; r = '0; apply();
      l = '0; r = N'(1) << p; apply();
    end
    for (int t = 0; t < 500; t++) begin
      l = '0; r = '0;
      for (int k = 0; k < N; k++) begin
        if ($urandom_range(0, 63) == 0) l[k] = 1'b1;
        if ($urandom_range(0, 63) == 0) r[k] = 1'b1;
      end
      apply();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
