// ct_gen: correction-term (CT) row of the FAM unit's partial product tree.
//
// The row collects two corrections, added once in the carry-save tree:
//   * +1 at bit 2j for every negative digit j, which completes the
//     two's-complement negation that pp_gen started by inverting the row;
//   * the constant -sum_j 2^(N+2j) (mod 2^W), which undoes the 2^N that each
//     of pp_gen's inverted sign bits added.
// The constant's lowest set bit is bit N, so the +1 of every digit with 2j < N
// is simply wired in; the few digits with 2j >= N are added to the constant.
// For the default sizes that is only the top digit, and the addition reduces
// to a choice between two precomputed constants.
//
// The source prints only the name "CT" beside the partial product generator;
// reading it as this correction term is this design's interpretation.
//
// Interface: neg[j] is the sign flag of digit j; ct is the W-bit row.
// Purely combinational.
module ct_gen #(
  parameter int unsigned N  = 8,
  parameter int unsigned ND = 5,
  parameter int unsigned W  = 2 * N + 1
) (
  input  logic [ND-1:0] neg,
  output logic [W-1:0]  ct
);

  function automatic logic [W-1:0] sign_const();
    logic [W-1:0] acc;
    acc = '0;
    for (int j = 0; j < ND; j++) acc = acc + (W'(1) << (N + 2 * j));
    return -acc;
  endfunction

  localparam logic [W-1:0] CONST = sign_const();

  always_comb begin
    logic [W-1:0] lo;
    logic [W-1:0] hi;
    lo = '0;
    hi = '0;
    for (int j = 0; j < ND; j++) begin
      if (2 * j < N) lo[2*j] = neg[j];
      else           hi     = hi | ((W'(neg[j])) << (2 * j));
    end
    ct = (CONST + hi) | lo;
  end

endmodule
