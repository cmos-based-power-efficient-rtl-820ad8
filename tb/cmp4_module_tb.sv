// cmp4_module_tb: exhaustive check of one 4-bit comparator module.
// For every A, B and enable, the expected bus bits come from the integer
// comparison of the operands and the position of their highest differing
// bit; the enable out must be 1 only when enabled and A = B.
module cmp4_module_tb;
  localparam int G = 4;
  logic [G-1:0] a, b, left, right, exp_l, exp_r;
  logic         en_in, en_out;
  int checks = 0, failures = 0;

  cmp4_module #(.G(G)) dut (.a(a), .b(b), .en_in(en_in), .left(left), .right(right), .en_out(en_out));

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int e = 0; e < 2; e++)
      for (int i = 0; i < 2**G; i++)
        for (int j = 0; j < 2**G; j++) begin
          int p;
          a = G'(i); b = G'(j); en_in = 1'(e);
          p = -1;
          for (int k = 0; k < G; k++) if (a[k] != b[k]) p = k;
          exp_l = (e == 1 && i > j) ? G'(1) << p : '0;
          exp_r = (e == 1 && i < j) ? G'(1) << p : '0;
          #1;
          checks += 3;
          if (left !== exp_l) begin
            failures++; $display("FAIL left a=%b b=%b en=%b left=%b exp=%b", a, b, en_in, left, exp_l);
          end
          if (right !== exp_r) begin
            failures++; $display("FAIL right a=%b b=%b en=%b right=%b exp=%b", a, b, en_in, right, exp_r);
          end
          if (en_out !== (e == 1 && i == j)) begin
            failures++; $display("FAIL en_out a=%b b=%b en=%b en_out=%b", a, b, en_in, en_out);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
