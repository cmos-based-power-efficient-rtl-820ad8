// set2_nor_tb: exhaustive check of set-2 for G = 4: s2 must be 1 exactly
// when no set-1 output is set (the module's operand bits are all equal).
module set2_nor_tb;
  localparam int G = 4;
  logic [G-1:0] d;
  logic         s2;
  int checks = 0, failures = 0;

  set2_nor #(.G(G)) dut (.d(d), .s2(s2));

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 2**G; i++) begin
      d = G'(i);
      #1;
      checks++;
      if (s2 !== (i == 0)) begin
        failures++;
        $display("FAIL d=%b s2=%b", d, s2);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
