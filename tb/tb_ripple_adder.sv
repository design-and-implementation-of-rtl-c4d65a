// tb_ripple_adder: exhaustive self-check of ripple_adder at its default
// width of 8 bits: every a, b and cin (131072 cases), {cout, sum} against
// the integer a+b+cin. Also counts carry-outs and full-length carry
// propagations (a+b = 255 with cin = 1), and fails if either never occurs.
module tb_ripple_adder;
  localparam int W = 8;
  logic [W-1:0] a, b, sum;
  logic         cin, cout;
  int checks = 0, failures = 0;
  int n_cout = 0, n_full_ripple = 0;

  ripple_adder dut (.a(a), .b(b), .cin(cin), .sum(sum), .cout(cout));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int expected;
    for (int va = 0; va < (1 << W); va++)
      for (int vb = 0; vb < (1 << W); vb++)
        for (int vc = 0; vc < 2; vc++) begin
          a = W'(va); b = W'(vb); cin = 1'(vc);
          #1;
          expected = va + vb + vc;
          checks++;
          if ({cout, sum} != (W+1)'(expected)) begin
            failures++;
            if (failures < 10)
              $display("FAIL %0d + %0d + %0d -> %0d", va, vb, vc, {cout, sum});
          end
          if (expected >= (1 << W)) n_cout++;
          if (va + vb == (1 << W) - 1 && vc == 1) n_full_ripple++;
        end
    $display("carry-outs: %0d, full-length ripples: %0d", n_cout, n_full_ripple);
    checks++;
    if (n_cout == 0 || n_full_ripple == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
