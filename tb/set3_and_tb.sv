// set3_and_tb: exhaustive check of the set-3 enable AND: the enable passes
// to the lower module only when it arrived and this module's bits are equal.
module set3_and_tb;
  logic s3_prev, s2, s3;
  int checks = 0, failures = 0;

  set3_and dut (.s3_prev(s3_prev), .s2(s2), .s3(s3));

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 4; i++) begin
      {s3_prev, s2} = 2'(i);
      #1;
      checks++;
      if (s3 !== (i == 3)) begin
        failures++;
        $display("FAIL s3_prev=%b s2=%b s3=%b", s3_prev, s2, s3);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
