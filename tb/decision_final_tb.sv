// decision_final_tb: exhaustive check of the last decision node for K = 2.
// gt follows any left bit, lt any right bit, eq is 1 when neither is set.
module decision_final_tb;
  localparam int K = 2;
  logic [K-1:0] l_in, r_in;
  logic         gt, eq, lt;
  int checks = 0, failures = 0;

  decision_final #(.K(K)) dut (.l_in(l_in), .r_in(r_in), .gt(gt), .eq(eq), .lt(lt));

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 2**K; i++)
      for (int j = 0; j < 2**K; j++) begin
        l_in = K'(i); r_in = K'(j);
        #1;
        checks += 3;
        if (gt !== (i != 0)) begin failures++; $display("FAIL gt l=%b r=%b", l_in, r_in); end
        if (lt !== (j != 0)) begin failures++; $display("FAIL lt l=%b r=%b", l_in, r_in); end
        if (eq !== (i == 0 && j == 0)) begin failures++; $display("FAIL eq l=%b r=%b", l_in, r_in); end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
