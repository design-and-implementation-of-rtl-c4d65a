// vedic_mul4: unsigned 4x4 multiplier by the Urdhva-Tiryakbhyam
// ("vertically and crosswise") method.
// Product bit k collects every partial product a[i]&b[j] with i+j = k, in
// seven steps from the vertical A0B0 to the vertical A3B3 with the crosswise
// pairs in between, plus the carries of column k-1. Each column is summed by
// a small tree of adder cells and its carries go to the next column:
//   col 0: r[0] = A0B0
//   col 1: HA(A0B1, A1B0)                       -> r[1]
//   col 2: FA(A0B2, A1B1, A2B0), then HA with the col-1 carry -> r[2]
//   col 3: special adder (A0B3, A1B2, A2B1, A3B0) gives S, C0, C1;
//          FA(S, col-2 carries)                 -> r[3]
//   col 4: FA(A1B3, A2B2, A3B1), then FA with C0 and the col-3 carry -> r[4]
//   col 5: FA(A2B3, A3B2, carry of the col-4 first FA), then FA with C1 and
//          the col-4 carry                      -> r[5]
//   col 6: FA(A3B3, both col-5 carries)         -> r[6], carry -> r[7]
// That is two half adders, seven full adders and one special adder, as the
// design specifies. Which carry enters which second-row adder is this
// implementation's reading; it is the only one where every carry moves one
// column up, so the product is exact.
// Interface: a, b (4 bits each), r = a*b (8 bits). Purely combinational.
module vedic_mul4 (
  input  logic [3:0] a,
  input  logic [3:0] b,
  output logic [7:0] r
);
  logic [3:0][3:0] pp;   // pp[i][j] = a[i] & b[j], weight 2^(i+j)

  always_comb begin
    for (int i = 0; i < 4; i++)
      for (int j = 0; j < 4; j++)
        pp[i][j] = a[i] & b[j];
  end

  // column 0
  assign r[0] = pp[0][0];

  // column 1
  logic c_h1;
  half_adder u_ha1 (.a(pp[0][1]), .b(pp[1][0]), .s(r[1]), .co(c_h1));

  // column 2
  logic s_t2, c_t2, c_h2;
  full_adder u_fa_t2 (.a(pp[0][2]), .b(pp[1][1]), .ci(pp[2][0]), .s(s_t2), .co(c_t2));
  half_adder u_ha2   (.a(s_t2), .b(c_h1), .s(r[2]), .co(c_h2));

  // column 3
  logic s_sa, c0_sa, c1_sa, c3;
  special_adder u_sa (
    .x ({pp[3][0], pp[2][1], pp[1][2], pp[0][3]}),
    .s (s_sa),
    .c0(c0_sa),
    .c1(c1_sa)
  );
  full_adder u_fa3 (.a(s_sa), .b(c_t2), .ci(c_h2), .s(r[3]), .co(c3));

  // column 4
  logic s_t4, c_t4, c4;
  full_adder u_fa_t4 (.a(pp[1][3]), .b(pp[2][2]), .ci(pp[3][1]), .s(s_t4), .co(c_t4));
  full_adder u_fa4   (.a(s_t4), .b(c0_sa), .ci(c3), .s(r[4]), .co(c4));

  // column 5
  logic s_m5, c_m5, c5;
  full_adder u_fa_m5 (.a(pp[2][3]), .b(pp[3][2]), .ci(c_t4), .s(s_m5), .co(c_m5));
  full_adder u_fa5   (.a(s_m5), .b(c1_sa), .ci(c4), .s(r[5]), .co(c5));

  // column 6 and the final carry
  full_adder u_fa6 (.a(pp[3][3]), .b(c_m5), .ci(c5), .s(r[6]), .co(r[7]));
endmodule
