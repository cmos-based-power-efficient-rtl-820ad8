// sub_decision_tb: exhaustive check of one decision-tree node for G = 4:
// each output is 1 exactly when some input of its bus is 1.
module sub_decision_tb;
  localparam int G = 4;
  logic [G-1:0] l_in, r_in;
  logic         l_out, r_out;
  int checks = 0, failures = 0;

  sub_decision #(.G(G)) dut (.l_in(l_in), .r_in(r_in), .l_out(l_out), .r_out(r_out));

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 2**G; i++)
      for (int j = 0; j < 2**G; j++) begin
        l_in = G'(i); r_in = G'(j);
        #1;
        checks += 2;
        if (l_out !== (i != 0)) begin
          failures++;
          $display("FAIL l_in=%b l_out=%b", l_in, l_out);
        end
        if (r_out !== (j != 0)) begin
          failures++;
          $display("FAIL r_in=%b r_out=%b", r_in, r_out);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
