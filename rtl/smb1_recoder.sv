// smb1_recoder: S-MB1 recoder. Turns two two's-complement numbers A and B
// directly into the radix-4 Modified Booth (MB) digits of their sum Y = A + B,
// with no carry-propagate adder in between.
//
// How it works. The operands are cut into 2-bit slices j = 0 .. K-1
// (K = NE/2). Each slice has three adder cells:
//   * a half adder on a[2j+1], b[2j+1]; its carry (weight 4^(j+1)) goes to
//     slice j+1, its sum stays at the odd position 2j+1;
//   * a full adder on a[2j], b[2j] and the half-adder carry of slice j-1; its
//     sum s[2j] is the digit's positive bit, its carry moves to position 2j+1;
//   * a modified half adder (ha_star, p + q = 2c - s) on the odd half-adder
//     sum and the full-adder carry; it leaves a negatively weighted bit
//     n[2j+1] and a carry c* that goes to slice j+1.
// Digit j is then  y_j = -2*n[2j+1] + s[2j] + c*_(j-1),  always in -2..+2.
// Each slice sees only one-bit signals from the slice below, which depend on
// that slice's own input bits, so no carry travels more than one slice and
// the delay does not grow with NE.
//
// Sign: a[NE-1] and b[NE-1] have negative weight. In the top slice the half
// adder's outputs are therefore negative and ha_star_pn (p - n = 2c - s)
// replaces ha_star. The top slice's two outgoing carries, the positive c* and
// the negative half-adder carry, form one extra digit
// y_K = c*_(K-1) - hc_(K-1) in -1..+1, so K+1 digits cover the NE+1-bit sum.
//
// The recoder being a direct sum-to-MB structure of full and half adders
// follows the source; the exact cell arrangement and the sign handling are
// this design's own.
//
// Interface: NE must be even and at least 2. dig[j] is digit j (weight 4^j),
// encoded as fam_pkg::mb_digit_t. Purely combinational.
module smb1_recoder
  import fam_pkg::*;
#(
  parameter int unsigned NE = 8,
  localparam int unsigned K = NE / 2
) (
  input  logic [NE-1:0]  a,
  input  logic [NE-1:0]  b,
  output mb_digit_t [K:0] dig
);

  logic [K:0]   hc;      // half-adder carry into slice j (hc[K]: negative, top)
  logic [K:0]   sc;      // ha_star carry into digit j (sc[K]: out of the top slice)
  logic [K-1:0] hs;      // odd-position half-adder sum
  logic [K-1:0] s_even;  // positive bit of digit j
  logic [K-1:0] fc;      // full-adder carry to position 2j+1
  logic [K-1:0] n_odd;   // negative bit of digit j

  assign hc[0] = 1'b0;
  assign sc[0] = 1'b0;

  for (genvar j = 0; j < K; j++) begin : g_slice
    half_adder u_ha (
      .a(a[2*j+1]), .b(b[2*j+1]), .s(hs[j]), .c(hc[j+1])
    );
    full_adder u_fa (
      .a(a[2*j]), .b(b[2*j]), .ci(hc[j]), .s(s_even[j]), .co(fc[j])
    );
    if (j < K - 1) begin : g_mid
      ha_star u_hs (.p(hs[j]), .q(fc[j]), .s(n_odd[j]), .c(sc[j+1]));
    end else begin : g_top
      ha_star_pn u_hs (.p(fc[j]), .n(hs[j]), .s(n_odd[j]), .c(sc[j+1]));
    end
    assign dig[j] = mb_encode(n_odd[j], s_even[j], sc[j]);
  end

  // Extra top digit: +sc[K] - hc[K].
  assign dig[K].one = sc[K] ^ hc[K];
  assign dig[K].two = 1'b0;
  assign dig[K].neg = hc[K] & ~sc[K];

  initial begin
    assert (NE >= 2 && NE % 2 == 0)
      else $error("smb1_recoder: NE must be even and >= 2");
  end

endmodule
