// tb_vedic_mul8: end-to-end self-check of the 8x8 Vedic multiplier at its
// only configuration.
// First the operand pairs shown in the design's published test-bench
// waveform (0x00*0x00, 0xDF*0xDB = 0xBEC5, 0x89*0xDF = 0x7757,
// 0xAB*0xC5 = 0x8397) are applied with their printed products. Then every
// one of the 65536 operand pairs is applied and Q is compared with A*B.
// From the operands alone it counts how often each carry path of the
// combining adders is taken: ADDER-1 carry (cross-product sum >= 256),
// ADDER-2 carry (low byte of that sum + upper nibble of the low product
// >= 256) and a special-adder C1 in any of the four 4x4
// multipliers. A path that is never taken counts as a failure.
module tb_vedic_mul8;
  logic [7:0]  A, B;
  logic [15:0] Q;
  int checks = 0, failures = 0;
  int n_c_adder1 = 0, n_c_adder2 = 0, n_sa_c1 = 0;

  vedic_mul8 dut (.A(A), .B(B), .Q(Q));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // all four middle-column partial products of a 4x4 nibble product set
  function automatic bit sa_c1(input logic [3:0] x, input logic [3:0] y);
    return x[0] & y[3] & x[1] & y[2] & x[2] & y[1] & x[3] & y[0];
  endfunction

  task automatic apply(input logic [7:0] va, input logic [7:0] vb,
                       input logic [15:0] expected);
    A = va; B = vb;
    #1;
    checks++;
    if (Q !== expected) begin
      failures++;
      if (failures < 10)
        $display("FAIL %02h * %02h -> %04h, expected %04h", va, vb, Q, expected);
    end
  endtask

  initial begin
    int m, n;
    // vectors printed in the published waveform
    apply(8'h00, 8'h00, 16'h0000);
    apply(8'hDF, 8'hDB, 16'hBEC5);
    apply(8'h89, 8'hDF, 16'h7757);
    apply(8'hAB, 8'hC5, 16'h8397);

    for (int va = 0; va < 256; va++)
      for (int vb = 0; vb < 256; vb++) begin
        apply(8'(va), 8'(vb), 16'(va * vb));
        m = (va % 16) * (vb / 16) + (va / 16) * (vb % 16);
        n = (m % 256) + ((va % 16) * (vb % 16)) / 16;
        if (m >= 256) n_c_adder1++;
        if (n >= 256) n_c_adder2++;
        if (sa_c1(A[3:0], B[3:0]) || sa_c1(A[7:4], B[3:0]) ||
            sa_c1(A[3:0], B[7:4]) || sa_c1(A[7:4], B[7:4])) n_sa_c1++;
      end

    $display("ADDER-1 carries: %0d, ADDER-2 carries: %0d, special-adder C1: %0d",
             n_c_adder1, n_c_adder2, n_sa_c1);
    checks++;
    if (n_c_adder1 == 0 || n_c_adder2 == 0 || n_sa_c1 == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
