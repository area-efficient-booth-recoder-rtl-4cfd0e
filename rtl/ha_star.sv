// ha_star: modified half adder with a negatively weighted sum output.
//
// Two positive bits of weight w are rewritten as a positive carry of weight
// 2w and a negative sum of weight w:  p + q = 2*c - s, so c = p | q and
// s = p ^ q. In the S-MB1 recoder this turns the odd bit of a slice into the
// negatively weighted bit that a Modified Booth digit needs.
module ha_star (
  input  logic p,
  input  logic q,
  output logic s,  // negative weight
  output logic c   // positive weight, one position up
);
  assign s = p ^ q;
  assign c = p | q;
endmodule
