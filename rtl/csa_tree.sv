// csa_tree: carry-save (Wallace-style) reduction of NR rows to two.
//
// Each level groups the rows it receives in threes and replaces every group
// by a sum row and a carry row (csa_3to2, one full adder per bit); rows left
// over pass to the next level unchanged. The number of rows falls from r to
// r - floor(r/3) per level until two remain: the sum row vs and the carry
// row vc, whose sum is the sum of all inputs modulo 2^W. For the default
// six rows (five partial products and the correction term) that is three
// levels: 6 -> 4 -> 3 -> 2.
//
// The source draws a "CSA Tree" with two outputs C and S feeding the final
// adder; the level-by-level grouping is this design's choice.
//
// Interface: rows[i] are the W-bit inputs; vs + vc = sum(rows) mod 2^W.
// Purely combinational.
module csa_tree #(
  parameter int unsigned W  = 17,
  parameter int unsigned NR = 6
) (
  input  logic [NR-1:0][W-1:0] rows,
  output logic [W-1:0]         vs,
  output logic [W-1:0]         vc
);

  // Rows present at level l.
  function automatic int unsigned rows_at(int unsigned l);
    int unsigned r;
    r = NR;
    for (int unsigned i = 0; i < l; i++) r = r - r / 3;
    return r;
  endfunction

  // Levels needed to get down to two rows.
  function automatic int unsigned num_levels();
    int unsigned l;
    l = 0;
    while (rows_at(l) > 2) l++;
    return l;
  endfunction

  localparam int unsigned NL = num_levels();

  // Level l reads `cur` and writes `nxt`; level l+1 reads level l's `nxt`.
  for (genvar l = 0; l < NL; l++) begin : g_lvl
    localparam int unsigned R = rows_at(l);
    localparam int unsigned G = R / 3;
    logic [R-1:0][W-1:0]   cur;
    logic [R-G-1:0][W-1:0] nxt;
    if (l == 0) begin : g_first
      assign cur = rows;
    end else begin : g_next
      assign cur = g_lvl[l-1].nxt;
    end
    for (genvar g = 0; g < G; g++) begin : g_csa
      csa_3to2 #(.W(W)) u_csa (
        .x(cur[3*g]), .y(cur[3*g+1]), .z(cur[3*g+2]),
        .s(nxt[2*g]), .c(nxt[2*g+1])
      );
    end
    for (genvar i = 3 * G; i < R; i++) begin : g_pass
      assign nxt[2*G+i-3*G] = cur[i];
    end
  end

  if (NL == 0) begin : g_none
    assign vs = rows[0];
    assign vc = (NR >= 2) ? rows[NR-1] : '0;
  end else begin : g_out
    assign vs = g_lvl[NL-1].nxt[0];
    assign vc = g_lvl[NL-1].nxt[1];
  end

endmodule
