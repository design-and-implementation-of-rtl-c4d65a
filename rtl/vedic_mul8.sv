// vedic_mul8: unsigned 8x8 Vedic multiplier, the top of the design.
// Each operand is split into nibbles, A = {Ah, Al} and B = {Bh, Bl}, and the
// Urdhva-Tiryakbhyam rule is applied once more at nibble level:
//   A*B = (Ah*Bh << 8) + ((Al*Bh + Ah*Bl) << 4) + Al*Bl
// Four vedic_mul4 blocks form the four nibble products in parallel. Three
// ripple-carry adders then combine them:
//   ADDER-1  m = Al*Bh + Ah*Bl          (8 bits, carry c1 of weight 2^12)
//   ADDER-2  n = m[7:0] + Al*Bl[7:4]    (8 bits, carry c2 of weight 2^12)
//   ADDER-3  Q[15:8] = Ah*Bh + {c2, n[7:4]} + (c1 << 4)
//   Q[7:4] = n[3:0],  Q[3:0] = Al*Bl[3:0]
// ADDER-3 adds a 5-bit upper field. Its bit 4 is ADDER-2's carry, and ADDER-1's
// carry is added at that same bit. ADDER-3 is built as two 8-bit ripple
// adders: the first adds Ah*Bh and {c2, n[7:4]}, the second adds c1 << 4 to
// that sum. (For no operand pair are c1 and c2 set together, but the adder
// does not rely on that.) The original block diagram draws the ADDER-2 to ADDER-3
// path 8 bits wide, with no carry. That carry is kept here: without it, 524 of
// the 65536 operand pairs (for example 0x2F * 0xFB) give a wrong product.
// Interface: A, B (8 bits each), Q = A*B (16 bits), the port names of the
// original design. Purely combinational: no clock, no registers.
module vedic_mul8 (
  input  logic [7:0]  A,
  input  logic [7:0]  B,
  output logic [15:0] Q
);
  logic [7:0] p_hh, p_lh, p_hl, p_ll;   // nibble products

  vedic_mul4 u_vm_hh (.a(A[7:4]), .b(B[7:4]), .r(p_hh));
  vedic_mul4 u_vm_lh (.a(A[3:0]), .b(B[7:4]), .r(p_lh));
  vedic_mul4 u_vm_hl (.a(A[7:4]), .b(B[3:0]), .r(p_hl));
  vedic_mul4 u_vm_ll (.a(A[3:0]), .b(B[3:0]), .r(p_ll));

  // ADDER-1: the two overlapping cross products
  logic [7:0] m;
  logic       c1;
  ripple_adder #(.WIDTH(8)) u_adder1 (
    .a(p_lh), .b(p_hl), .cin(1'b0), .sum(m), .cout(c1)
  );

  // ADDER-2: upper nibble of the low product onto the cross-product sum
  logic [7:0] n;
  logic       c2;
  ripple_adder #(.WIDTH(8)) u_adder2 (
    .a(m), .b({4'b0000, p_ll[7:4]}), .cin(1'b0), .sum(n), .cout(c2)
  );

  // ADDER-3: high product plus the upper field of ADDER-2 and ADDER-1's carry
  // at the fifth bit position. The product fits 16 bits, so neither carry-out
  // of this stage can be set: c3a and c3b are left unused on purpose.
  logic [7:0] hi_part;
  logic       c3a, c3b;
  ripple_adder #(.WIDTH(8)) u_adder3a (
    .a(p_hh), .b({3'b000, c2, n[7:4]}), .cin(1'b0), .sum(hi_part), .cout(c3a)
  );
  ripple_adder #(.WIDTH(8)) u_adder3b (
    .a(hi_part), .b({3'b000, c1, 4'b0000}), .cin(1'b0), .sum(Q[15:8]), .cout(c3b)
  );

  assign Q[7:4] = n[3:0];
  assign Q[3:0] = p_ll[3:0];
endmodule
