// ripple_adder: WIDTH-bit ripple-carry adder.
// A chain of full_adder cells: stage i adds a[i], b[i] and the carry of
// stage i-1; stage 0 takes cin and the last stage's carry is cout.
// Purely combinational; the delay grows by one full adder per bit.
// The 8x8 Vedic multiplier uses three of these (ADDER-1, ADDER-2, ADDER-3)
// to combine its four 4x4 partial products. The design says only that the
// adders are ripple-carry adders with modified logic levels; the modification
// is not known, so this is the plain ripple chain.
module ripple_adder #(
  parameter int unsigned WIDTH = 8
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);
  logic [WIDTH:0] c;   // c[i] is the carry into stage i

  assign c[0] = cin;

  for (genvar i = 0; i < WIDTH; i++) begin : g_stage
    full_adder u_fa (
      .a (a[i]),
      .b (b[i]),
      .ci(c[i]),
      .s (sum[i]),
      .co(c[i+1])
    );
  end

  assign cout = c[WIDTH];
endmodule
