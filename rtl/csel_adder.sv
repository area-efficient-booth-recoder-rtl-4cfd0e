// csel_adder: carry-select final adder of the FAM unit.
//
// The low WL bits are added once. The high W-WL bits are added twice at the
// same time, once assuming a carry-in of 0 and once assuming 1; when the
// low adder's carry-out is known it selects the matching high result through
// a multiplexer. All three sub-adders are carry-lookahead adders (cla_adder).
//
// The carry-select arrangement (one adder for the low part, two for the high
// part, selection by the low carry) follows the source's description; using
// lookahead sub-adders reflects the source naming the final adder a CLA. The
// split point WL = W/2 is this design's choice.
//
// Interface: sum = a + b (mod 2^W), cout its carry out. Purely
// combinational.
module csel_adder #(
  parameter int unsigned W  = 17,
  parameter int unsigned WL = W / 2
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] sum,
  output logic         cout
);

  localparam int unsigned WH = W - WL;

  logic [WL-1:0] s_lo;
  logic          c_lo;
  logic [WH-1:0] s_h0;
  logic [WH-1:0] s_h1;
  logic          co_h0;
  logic          co_h1;

  cla_adder #(.W(WL)) u_lo (
    .a(a[WL-1:0]), .b(b[WL-1:0]), .cin(1'b0), .sum(s_lo), .cout(c_lo)
  );
  cla_adder #(.W(WH)) u_hi0 (
    .a(a[W-1:WL]), .b(b[W-1:WL]), .cin(1'b0), .sum(s_h0), .cout(co_h0)
  );
  cla_adder #(.W(WH)) u_hi1 (
    .a(a[W-1:WL]), .b(b[W-1:WL]), .cin(1'b1), .sum(s_h1), .cout(co_h1)
  );

  assign cout = c_lo ? co_h1 : co_h0;

  assign sum = {c_lo ? s_h1 : s_h0, s_lo};

endmodule
