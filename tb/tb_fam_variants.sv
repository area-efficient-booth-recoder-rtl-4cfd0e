// tb_fam_variants: the fused add-multiply unit in its other number formats,
// each tested exhaustively against X * (A + B):
//   * signed, odd width N = 5 (recoded on 6 bits after sign extension);
//   * unsigned, N = 4 and N = 5 (zero-extended by one bit inside);
//   * signed, N = 2 (the smallest unit: one recoder slice).
module tb_fam_variants;

  int checks = 0;
  int failures = 0;

  logic [4:0]  a5, b5, x5, ua5, ub5, ux5;
  logic [10:0] z5, uz5;
  logic [3:0]  ua4, ub4, ux4;
  logic [8:0]  uz4;
  logic [1:0]  a2, b2, x2;
  logic [4:0]  z2;

  fam_smb1_even #(.N(5))                      s5 (.a(a5),  .b(b5),  .x(x5),  .z(z5));
  fam_smb1_even #(.N(5), .SIGNED_OPS(1'b0))   u5 (.a(ua5), .b(ub5), .x(ux5), .z(uz5));
  fam_smb1_even #(.N(4), .SIGNED_OPS(1'b0))   u4 (.a(ua4), .b(ub4), .x(ux4), .z(uz4));
  fam_smb1_even #(.N(2))                      s2 (.a(a2),  .b(b2),  .x(x2),  .z(z2));

  task automatic check(input string tag, input longint got, input longint exp_v);
    checks++;
    if (got != exp_v) begin
      failures++;
      if (failures <= 10) $display("FAIL %s: %0d expected %0d", tag, got, exp_v);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 32768; v++) begin
      {a5, b5, x5}    = 15'(v);
      {ua5, ub5, ux5} = 15'(v);
      {ua4, ub4, ux4} = 12'(v);
      {a2, b2, x2}    = 6'(v);
      #1;
      check("signed N=5", longint'(signed'(z5)),
            longint'(signed'(x5)) * (longint'(signed'(a5)) + longint'(signed'(b5))));
      check("unsigned N=5", longint'(uz5), longint'(ux5) * (longint'(ua5) + longint'(ub5)));
      if (v < 4096)
        check("unsigned N=4", longint'(uz4), longint'(ux4) * (longint'(ua4) + longint'(ub4)));
      if (v < 64)
        check("signed N=2", longint'(signed'(z2)),
              longint'(signed'(x2)) * (longint'(signed'(a2)) + longint'(signed'(b2))));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
