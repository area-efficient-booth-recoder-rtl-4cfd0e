// tb_pp_gen: test of the partial product generator at its default size
// (N = 8, five digits, 17-bit rows).
//
// For random multiplicands and random legal digits it checks every row
// against the value it must carry: row j = (d_j * X, one's complemented
// when d_j < 0, i.e. d_j*X - neg_j) + 2^8, times 4^j, modulo 2^17. The +2^8
// is the inverted sign bit that the correction term removes later.
module tb_pp_gen;
  import fam_pkg::*;

  localparam int N = 8, ND = 5, W = 17;

  int checks = 0;
  int failures = 0;

  logic [N-1:0] x;
  mb_digit_t [ND-1:0] dig;
  logic [ND-1:0][W-1:0] pp;

  pp_gen dut (.x(x), .dig(dig), .pp(pp));

  function automatic mb_digit_t make_digit(input int v);
    mb_digit_t d;
    d.neg = v < 0;
    d.one = (v == 1) || (v == -1);
    d.two = (v == 2) || (v == -2);
    return d;
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int dv [ND];
    longint e;
    logic [W-1:0] exp_row;
    for (int t = 0; t < 20000; t++) begin
      x = (t < 256) ? N'(t) : N'($urandom);
      for (int j = 0; j < ND; j++) begin
        dv[j] = (t < 256) ? ((t + j) % 5) - 2 : int'($urandom_range(0, 4)) - 2;
        dig[j] = make_digit(dv[j]);
      end
      #1;
      for (int j = 0; j < ND; j++) begin
        e = longint'(dv[j]) * longint'(signed'(x)) - (dv[j] < 0 ? 1 : 0) + 256;
        e = e * (longint'(1) << (2 * j));
        exp_row = W'(e);
        checks++;
        if (pp[j] !== exp_row) begin
          failures++;
          if (failures <= 10)
            $display("FAIL x=%0d d%0d=%0d: row %h expected %h", signed'(x), j, dv[j],
                     pp[j], exp_row);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
