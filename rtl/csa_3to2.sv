// csa_3to2: one row of full adders (a 3:2 carry-save adder) over W-bit words.
// x + y + z = s + c (mod 2^W); the carry row is already shifted up one bit.
module csa_3to2 #(
  parameter int unsigned W = 17
) (
  input  logic [W-1:0] x,
  input  logic [W-1:0] y,
  input  logic [W-1:0] z,
  output logic [W-1:0] s,
  output logic [W-1:0] c
);
  // The top bit's carry would leave the word, so that bit needs only a sum.
  for (genvar i = 0; i < W - 1; i++) begin : g_bit
    full_adder u_fa (.a(x[i]), .b(y[i]), .ci(z[i]), .s(s[i]), .co(c[i+1]));
  end

  assign s[W-1] = x[W-1] ^ y[W-1] ^ z[W-1];
  assign c[0]   = 1'b0;
endmodule
