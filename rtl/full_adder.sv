// full_adder: a + b + ci = 2*co + s. Building cell of the S-MB1 recoder and of
// the 3:2 carry-save rows of the partial product tree.
module full_adder (
  input  logic a,
  input  logic b,
  input  logic ci,
  output logic s,
  output logic co
);
  assign s  = a ^ b ^ ci;
  assign co = (a & b) | (a & ci) | (b & ci);
endmodule
