// set4_priority_tb: exhaustive check of set-4 for G = 4. With en = 1 the
// output must be one-hot at the highest set D bit (or zero for D = 0); with
// en = 0 it must be zero.
module set4_priority_tb;
  localparam int G = 4;
  logic         en;
  logic [G-1:0] d, s4, exp_s4;
  int checks = 0, failures = 0;

  set4_priority #(.G(G)) dut (.en(en), .d(d), .s4(s4));

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int e = 0; e < 2; e++)
      for (int i = 0; i < 2**G; i++) begin
        en = 1'(e); d = G'(i);
        // reference: position of the highest set bit, found from the bottom
        exp_s4 = '0;
        if (e == 1)
          for (int k = 0; k < G; k++)
            if (d[k]) exp_s4 = G'(1) << k;
        #1;
        checks++;
        if (s4 !== exp_s4) begin
          failures++;
          $display("FAIL en=%b d=%b s4=%b expected %b", en, d, s4, exp_s4);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
