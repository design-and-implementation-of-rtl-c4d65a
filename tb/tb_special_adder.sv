// tb_special_adder: exhaustive self-check of special_adder.
// For all 16 input words, {c1, c0, s} must equal the number of set inputs.
module tb_special_adder;
  logic [3:0] x;
  logic       s, c0, c1;
  int checks = 0, failures = 0;

  special_adder dut (.x(x), .s(s), .c0(c0), .c1(c1));

  initial begin : watchdog
    #1000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int count;
    for (int v = 0; v < 16; v++) begin
      x = 4'(v);
      #1;
      count = 0;
      for (int k = 0; k < 4; k++) count += int'(x[k]);
      checks++;
      if ({c1, c0, s} != 3'(count)) begin
        failures++;
        $display("FAIL x=%b -> c1=%0b c0=%0b s=%0b, expected %0d", x, c1, c0, s, count);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
