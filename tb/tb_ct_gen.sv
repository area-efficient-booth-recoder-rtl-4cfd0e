// tb_ct_gen: exhaustive test of the correction-term row at the default size
// (N = 8, five digits, W = 17) and at N = 7, seven digits, W = 15, where
// several digit signs land on bits of the constant.
//
// Expected row: sum_j neg_j * 4^j  -  sum_j 2^(N+2j), modulo 2^W.
module tb_ct_gen;

  int checks = 0;
  int failures = 0;

  logic [4:0]  neg5;
  logic [16:0] ct5;
  logic [6:0]  neg7;
  logic [14:0] ct7;

  ct_gen                              dut5 (.neg(neg5), .ct(ct5));
  ct_gen #(.N(7), .ND(7), .W(15))     dut7 (.neg(neg7), .ct(ct7));

  function automatic longint expect_ct(input int n, input int nd, input int w,
                                       input longint neg);
    longint e;
    e = 0;
    for (int j = 0; j < nd; j++) begin
      if (neg[j]) e += longint'(1) << (2 * j);
      e -= longint'(1) << (n + 2 * j);
    end
    return e & ((longint'(1) << w) - 1);
  endfunction

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 128; v++) begin
      neg5 = 5'(v);
      neg7 = 7'(v);
      #1;
      if (v < 32) begin
        checks++;
        if (longint'(ct5) != expect_ct(8, 5, 17, longint'(v))) begin
          failures++;
          $display("FAIL N=8 neg=%b: ct=%h expected %h", neg5, ct5, expect_ct(8, 5, 17, v));
        end
      end
      checks++;
      if (longint'(ct7) != expect_ct(7, 7, 15, longint'(v))) begin
        failures++;
        $display("FAIL N=7 neg=%b: ct=%h expected %h", neg7, ct7, expect_ct(7, 7, 15, v));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
