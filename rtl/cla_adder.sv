// cla_adder: W-bit carry-lookahead adder with 4-bit lookahead groups.
//
// Every bit forms generate g = a & b and propagate p = a ^ b. Inside a group
// each carry is written out as a sum of products of g, p and the group's
// carry-in (c_i = g_(i-1) | p_(i-1) g_(i-2) | ... | p_(i-1)..p_base c_grp),
// so no carry ripples from bit to bit. Each group also forms a group
// generate G and propagate P, and the group carries follow
// c_grp(k+1) = G_k | P_k c_grp(k). The last group may be narrower than 4.
//
// The source names the final adder "CLA Adder" only; the group size and the
// two-level arrangement are this design's choice.
//
// Interface: sum = a + b + cin (mod 2^W), cout the carry out of bit W-1.
// Purely combinational.
module cla_adder #(
  parameter int unsigned W  = 17,
  parameter int unsigned GS = 4
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] sum,
  output logic         cout
);

  localparam int unsigned NG = (W + GS - 1) / GS;

  logic [W-1:0] g;
  logic [W-1:0] p;
  logic [W:0]   c;
  logic [NG:0]  cg;
  logic [NG-1:0] gg;
  logic [NG-1:0] gp;

  assign g = a & b;
  assign p = a ^ b;

  always_comb begin
    int unsigned lo;
    int unsigned hi;
    logic term;
    logic prop;
    c  = '0;
    cg = '0;
    gg = '0;
    gp = '0;
    cg[0] = cin;
    for (int unsigned k = 0; k < NG; k++) begin
      lo = k * GS;
      hi = (lo + GS < W) ? lo + GS : W;  // bits lo .. hi-1
      // Group generate and propagate.
      gp[k] = 1'b1;
      gg[k] = 1'b0;
      for (int unsigned m = lo; m < hi; m++) begin
        gg[k] = g[m] | (p[m] & gg[k]);
        gp[k] = gp[k] & p[m];
      end
      // Second level: carry into the next group.
      cg[k+1] = gg[k] | (gp[k] & cg[k]);
      // First level: every carry inside the group as a sum of products.
      for (int unsigned i = lo; i <= hi; i++) begin
        prop = 1'b1;
        for (int unsigned m = lo; m < i; m++) prop = prop & p[m];
        c[i] = prop & cg[k];
        for (int unsigned m = lo; m < i; m++) begin
          term = g[m];
          for (int unsigned q = m + 1; q < i; q++) term = term & p[q];
          c[i] = c[i] | term;
        end
      end
    end
  end

  assign sum  = p ^ c[W-1:0];
  assign cout = c[W];

endmodule
