// fam_smb1_even: fused add-multiply (FAM) unit, Z = X * (A + B).
//
// A conventional add-multiply unit first adds A and B with a carry-propagate
// adder and then Booth-encodes the sum for the multiplier. Here the adder and
// the Booth encoder are fused: the S-MB1 recoder (smb1_recoder) turns A and B
// straight into the radix-4 Modified Booth digits of A + B using one row of
// full/half adders per 2-bit slice, so the only carry-propagate adder left
// is the multiplier's final one. Data path:
//
//   A, B --> smb1_recoder --digits--> pp_gen (with X) --rows--+
//                          --signs---> ct_gen --correction row-+--> csa_tree
//   csa_tree --S, C--> csel_adder (carry-select of lookahead adders) --> Z
//
// Number formats. With SIGNED_OPS = 1 (default) A, B, X are N-bit two's
// complement numbers; with SIGNED_OPS = 0 they are unsigned and are
// zero-extended by one bit inside. An odd internal width is sign-extended by
// one bit before recoding, since the recoder works on 2-bit slices. Z has
// 2N+1 bits, which holds every exact product in either format (the N+1-bit
// sum times the N-bit X). Internally the product is formed on 2NI+1 bits
// (NI the internal operand width) and its low 2N+1 bits are the output.
//
// The block structure (recoder in place of adder + MB encoder, partial
// product generator, CT block, carry-save tree, final adder) and N = 8 follow
// the source; the cell-level details of every block are this design's, as
// described in each module.
//
// The final adder's carry out is left open: the sum is formed modulo
// 2^(2NI+1), which already holds every product.
//
// Timing: purely combinational, no clock, no latency.
module fam_smb1_even
  import fam_pkg::*;
#(
  parameter int unsigned N          = 8,
  parameter bit          SIGNED_OPS = 1'b1
) (
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  input  logic [N-1:0]   x,
  output logic [2*N:0]   z
);

  localparam int unsigned NI = SIGNED_OPS ? N : N + 1;   // internal signed width
  localparam int unsigned NE = NI + (NI % 2);            // even, for 2-bit slices
  localparam int unsigned ND = NE / 2 + 1;               // MB digits of A+B
  localparam int unsigned WI = 2 * NI + 1;               // internal product width
  localparam int unsigned NR = ND + 1;                   // rows into the tree

  logic [NI-1:0] ai, bi, xi;
  logic [NE-1:0] ae, be;

  // Bring the operands to the internal signed width, then to an even width.
  always_comb begin
    if (SIGNED_OPS) begin
      ai = NI'(signed'(a));
      bi = NI'(signed'(b));
      xi = NI'(signed'(x));
    end else begin
      ai = NI'(a);
      bi = NI'(b);
      xi = NI'(x);
    end
    ae = NE'(signed'(ai));
    be = NE'(signed'(bi));
  end

  mb_digit_t [ND-1:0]       dig;
  logic [ND-1:0]            neg;
  logic [ND-1:0][WI-1:0]    pp;
  logic [WI-1:0]            ct;
  logic [NR-1:0][WI-1:0]    rows;
  logic [WI-1:0]            vs, vc, zi;

  smb1_recoder #(.NE(NE)) u_rec (.a(ae), .b(be), .dig(dig));

  pp_gen #(.N(NI), .ND(ND), .W(WI)) u_ppg (.x(xi), .dig(dig), .pp(pp));

  for (genvar j = 0; j < ND; j++) begin : g_neg
    assign neg[j] = dig[j].neg;
  end

  ct_gen #(.N(NI), .ND(ND), .W(WI)) u_ct (.neg(neg), .ct(ct));

  assign rows = {ct, pp};

  csa_tree #(.W(WI), .NR(NR)) u_tree (.rows(rows), .vs(vs), .vc(vc));

  csel_adder #(.W(WI)) u_fadd (.a(vs), .b(vc), .sum(zi), .cout());

  assign z = zi[2*N:0];

endmodule
