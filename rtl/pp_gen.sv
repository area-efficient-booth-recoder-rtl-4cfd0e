// pp_gen: partial product generator of the FAM unit.
//
// For each Modified Booth digit d_j it selects 0, X or 2X as an (N+1)-bit
// two's-complement word, inverts it when d_j is negative (the +1 that
// completes the negation is supplied by the correction-term row, ct_gen),
// and inverts the word's sign bit. Inverting the sign bit adds 2^N to the
// row, which ct_gen takes away again with one constant, so no row has to be
// sign-extended. Row j is placed at bit 2j of a W-bit word; bits that fall
// above W are dropped, as the whole sum is formed modulo 2^W.
//
// Only the name of this block is given by the source; the selection scheme is
// the usual MB one and the sign-bit inversion is this design's choice.
//
// Interface: x is the N-bit two's-complement multiplicand, dig the ND digits
// (weight 4^j), pp[j] the aligned row j. Purely combinational.
module pp_gen
  import fam_pkg::*;
#(
  parameter int unsigned N  = 8,
  parameter int unsigned ND = 5,
  parameter int unsigned W  = 2 * N + 1
) (
  input  logic [N-1:0]                x,
  input  mb_digit_t [ND-1:0]          dig,
  output logic [ND-1:0][W-1:0]        pp
);

  always_comb begin
    logic [N:0]     mag;
    logic [N:0]     row;
    for (int j = 0; j < ND; j++) begin
      if (dig[j].two)      mag = {x, 1'b0};
      else if (dig[j].one) mag = {x[N-1], x};
      else                 mag = '0;
      row    = mag ^ {(N+1){dig[j].neg}};
      row[N] = ~row[N];
      pp[j]  = W'(row) << (2 * j);
    end
  end

endmodule
