// half_adder: a + b = 2*c + s. Building cell of the S-MB1 recoder.
module half_adder (
  input  logic a,
  input  logic b,
  output logic s,
  output logic c
);
  assign s = a ^ b;
  assign c = a & b;
endmodule
