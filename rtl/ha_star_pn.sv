// ha_star_pn: modified half adder for one positive and one negative input.
//
// p - n = 2*c - s with c = p & ~n and s = p ^ n (c positive, s negative).
// Used in the most significant slice of the S-MB1 recoder, where the sum of
// the two two's-complement sign bits arrives with negative weight.
module ha_star_pn (
  input  logic p,  // positive weight
  input  logic n,  // negative weight
  output logic s,  // negative weight
  output logic c   // positive weight, one position up
);
  assign s = p ^ n;
  assign c = p & ~n;
endmodule
