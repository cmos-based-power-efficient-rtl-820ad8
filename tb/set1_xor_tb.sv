// set1_xor_tb: exhaustive check of set-1 (bitwise difference) for G = 4.
// Every pair of 4-bit operands is applied; each D bit must be 1 exactly
// where the operand bits differ.
module set1_xor_tb;
  localparam int G = 4;
  logic [G-1:0] a, b, d;
  int checks = 0, failures = 0;

  set1_xor #(.G(G)) dut (.a(a), .b(b), .d(d));

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
        a = G'(i); b = G'(j);
        #1;
        for (int k = 0; k < G; k++) begin
          checks++;
          if (d[k] !== (a[k] != b[k])) begin
            failures++;
            $display("FAIL a=%b b=%b d=%b bit %0d", a, b, d, k);
          end
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
