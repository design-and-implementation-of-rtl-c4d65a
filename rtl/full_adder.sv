// full_adder: one-bit full adder.
// Adds three bits of equal weight: s is their XOR, co their majority.
// Purely combinational, no clock. It is the FA cell of the 4x4 Vedic
// multiplier and the stage of the ripple-carry adders; the gate form is the
// textbook one.
module full_adder (
  input  logic a,
  input  logic b,
  input  logic ci,
  output logic s,
  output logic co
);
  always_comb begin
    s  = a ^ b ^ ci;
    co = (a & b) | (a & ci) | (b & ci);
  end
endmodule
