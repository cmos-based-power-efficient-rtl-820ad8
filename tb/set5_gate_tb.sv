// set5_gate_tb: exhaustive check of set-5 for G = 4: left copies A and
// right copies B at the selected positions, both are 0 elsewhere.
module set5_gate_tb;
  localparam int G = 4;
  logic [G-1:0] s4, a, b, left, right;
  int checks = 0, failures = 0;

  set5_gate #(.G(G)) dut (.s4(s4), .a(a), .b(b), .left(left), .right(right));

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 2**(3*G); v++) begin
      {s4, a, b} = (3*G)'(v);
      #1;
      for (int k = 0; k < G; k++) begin
        checks += 2;
        if (left[k] !== (s4[k] ? a[k] : 1'b0)) begin
          failures++;
          $display("FAIL left s4=%b a=%b left=%b", s4, a, left);
        end
        if (right[k] !== (s4[k] ? b[k] : 1'b0)) begin
          failures++;
          $display("FAIL right s4=%b b=%b right=%b", s4, b, right);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
