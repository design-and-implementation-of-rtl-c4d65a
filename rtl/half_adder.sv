// half_adder: one-bit half adder.
// Adds two bits: s is their XOR (weight 1), co their AND (weight 2).
// Purely combinational, no clock. It is one of the two HA cells of the
// 4x4 Vedic multiplier; the gate form is the textbook one.
module half_adder (
  input  logic a,
  input  logic b,
  output logic s,
  output logic co
);
  always_comb begin
    s  = a ^ b;
    co = a & b;
  end
endmodule
