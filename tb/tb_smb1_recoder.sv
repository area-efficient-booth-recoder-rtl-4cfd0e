// tb_smb1_recoder: exhaustive test of the S-MB1 recoder at 8 bits (its
// default) and at 2 and 6 bits.
//
// For every pair A, B it checks that each digit is a legal Modified Booth
// digit (never both |d|=1 and |d|=2, no negative zero, the extra top digit
// within -1..+1) and that sum_j d_j * 4^j equals the signed sum A + B.
// Combinational; outputs are sampled 1 time unit after the inputs change.
module tb_smb1_recoder;
  import fam_pkg::*;

  int checks = 0;
  int failures = 0;

  logic [7:0] a8, b8;
  logic [5:0] a6, b6;
  logic [1:0] a2, b2;
  mb_digit_t [4:0] d8;
  mb_digit_t [3:0] d6;
  mb_digit_t [1:0] d2;

  smb1_recoder              dut8 (.a(a8), .b(b8), .dig(d8));
  smb1_recoder #(.NE(6))    dut6 (.a(a6), .b(b6), .dig(d6));
  smb1_recoder #(.NE(2))    dut2 (.a(a2), .b(b2), .dig(d2));

  function automatic int legal(input mb_digit_t d, input bit top);
    if (d.one && d.two) return 0;
    if (d.neg && !d.one && !d.two) return 0;
    if (top && d.two) return 0;
    return 1;
  endfunction

  task automatic check(input string tag, input int got, input int exp_v, input int ok,
                       input int av, input int bv);
    checks++;
    if (got != exp_v || !ok) begin
      failures++;
      if (failures <= 10)
        $display("FAIL %s a=%0d b=%0d: digits give %0d expected %0d legal=%0d",
                 tag, av, bv, got, exp_v, ok);
    end
  endtask

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int v, ok;
    for (int av = -128; av < 128; av++)
      for (int bv = -128; bv < 128; bv++) begin
        a8 = 8'(av); b8 = 8'(bv);
        a6 = 6'(av); b6 = 6'(bv);
        a2 = 2'(av); b2 = 2'(bv);
        #1;
        v = 0; ok = 1;
        for (int j = 4; j >= 0; j--) begin
          v = v * 4 + mb_value(d8[j]);
          ok &= legal(d8[j], j == 4);
        end
        check("NE=8", v, av + bv, ok, av, bv);
        if (av >= -32 && av < 32 && bv >= -32 && bv < 32) begin
          v = 0; ok = 1;
          for (int j = 3; j >= 0; j--) begin
            v = v * 4 + mb_value(d6[j]);
            ok &= legal(d6[j], j == 3);
          end
          check("NE=6", v, av + bv, ok, av, bv);
        end
        if (av >= -2 && av < 2 && bv >= -2 && bv < 2) begin
          v = 4 * mb_value(d2[1]) + mb_value(d2[0]);
          ok = legal(d2[0], 0) & legal(d2[1], 1);
          check("NE=2", v, av + bv, ok, av, bv);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
