// special_adder: four-input, three-output one-bit adder of the 4x4 Vedic
// multiplier.
// It adds the four crosswise partial products of the middle column
// (A0B3, A1B2, A2B1, A3B0), whose count 0..4 needs three bits: s has weight 1,
// c0 weight 2 and c1 weight 4. Replacing two cascaded full adders with one
// flat counter shortens the critical path of the 4x4 multiplier.
// The four-in/three-out function and the names S, C0, C1 are the design's;
// the two-level gate form below is this implementation's own:
//   s  = parity of the four inputs
//   c0 = exactly two or exactly three inputs set
//   c1 = all four inputs set
// Purely combinational, no clock.
module special_adder (
  input  logic [3:0] x,
  output logic       s,
  output logic       c0,
  output logic       c1
);
  logic any_pair;   // at least two inputs set
  always_comb begin
    s        = ^x;
    any_pair = (x[0] & x[1]) | (x[0] & x[2]) | (x[0] & x[3])
             | (x[1] & x[2]) | (x[1] & x[3]) | (x[2] & x[3]);
    c1       = &x;
    c0       = any_pair & ~c1;
  end
endmodule
