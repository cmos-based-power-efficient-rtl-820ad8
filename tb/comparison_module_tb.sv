// comparison_module_tb: checks the 128-bit comparing stage.
// Operand pairs: equal operands, and for every bit position p pairs that
// agree above p and differ at p (A = 1 or B = 1 there) with random lower
// bits, plus fully random pairs. Expected buses have a single 1 at the
// highest differing bit on the left (A > B) or right (A < B) bus; expected
// enables are 1 into module k exactly when all bits above module k agree.
module comparison_module_tb;
  localparam int N = 128;
  localparam int G = 4;
  localparam int M = N / G;

  logic [N-1:0] a, b, left_bus, right_bus, exp_l, exp_r;
  logic [M:0]   en, exp_en;
  int checks = 0, failures = 0;

  comparison_module #(.N(N), .G(G)) dut (
    .a(a), .b(b), .left_bus(left_bus), .right_bus(right_bus), .en(en));

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
    int p;
    p = -1;
    for (int k = 0; k < N; k++) if (a[k] != b[k]) p = k;
    exp_l = (p >= 0 && a[p]) ? (N'(1) << p) : '0;
    exp_r = (p >= 0 && b[p]) ? (N'(1) << p) : '0;
    for (int k = 0; k <= M; k++) exp_en[k] = ((a >> (G * k)) == (b >> (G * k)));
    #1;
    checks += 3;
    if (left_bus !== exp_l) begin failures++; $display("FAIL left a=%h b=%h got %h exp %h", a, b, left_bus, exp_l); end
    if (right_bus !== exp_r) begin failures++; $display("FAIL right a=%h b=%h got %h exp %h", a, b, right_bus, exp_r); end
    if (en !== exp_en) begin failures++; $display("FAIL en a=%h b=%h got %b exp %b", a, b, en, exp_en); end
  endtask

  initial begin
    a = '0; b = '0; apply();
    a = '1; b = '1; apply();
    for (int r = 0; r < 20; r++) begin a = rnd(); b = a; apply(); end
    for (int p = 0; p < N; p++)
      for (int r = 0; r < 4; r++) begin
        a = rnd();
        b = rnd();
        // agree above p, differ at p
        for (int k = p + 1; k < N; k++) b[k] = a[k];
        b[p] = ~a[p];
        apply();
      end
    for (int r = 0; r < 500; r++) begin a = rnd(); b = rnd(); apply(); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
