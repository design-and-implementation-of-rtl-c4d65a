// tb_vedic_mul4: exhaustive self-check of vedic_mul4.
// All 256 operand pairs, r against the integer product a*b. Counts the cases
// in which the special adder's second carry (all four middle-column partial
// products set) is used, and fails if it never is.
module tb_vedic_mul4;
  logic [3:0] a, b;
  logic [7:0] r;
  int checks = 0, failures = 0;
  int n_c1 = 0;

  vedic_mul4 dut (.a(a), .b(b), .r(r));

  initial begin : watchdog
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int va = 0; va < 16; va++)
      for (int vb = 0; vb < 16; vb++) begin
        a = 4'(va); b = 4'(vb);
        #1;
        checks++;
        if (r != 8'(va * vb)) begin
          failures++;
          $display("FAIL %0d * %0d -> %0d", va, vb, r);
        end
        if (a[0] & b[3] & a[1] & b[2] & a[2] & b[1] & a[3] & b[0]) n_c1++;
      end
    $display("special-adder C1 cases: %0d", n_c1);
    checks++;
    if (n_c1 == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
