// tb_fam_smb1_even: end-to-end test of the fused add-multiply unit at its
// default size (N = 8, signed operands, 17-bit product).
//
// It applies the demonstration vector A = 14, B = 13, X = 24 (Z = 648), the
// extreme operands, and then all 2^24 combinations of A, B and X, and
// compares Z with X * (A + B) computed with integer arithmetic. It also
// counts how often each mechanism of the design was exercised and fails a
// mechanism that never happened:
//   * each Booth digit value -2..+2 in the recoder's output;
//   * the half-adder carry and the ha_star carry passed between slices;
//   * the negative top digit (two's-complement sign handling);
//   * the carry-select adder taking its carry-in-1 and carry-in-0 halves.
// The unit is combinational; each vector is checked 1 time unit after it is
// applied. A watchdog ends the run if it ever stalls.
module tb_fam_smb1_even;
  import fam_pkg::*;

  localparam int N  = 8;
  localparam int ND = N / 2 + 1;

  logic [N-1:0] a, b, x;
  logic [2*N:0] z;

  int checks = 0;
  int failures = 0;
  int dig_seen [5];
  int hc_seen = 0, sc_seen = 0, top_neg_seen = 0, csel1_seen = 0, csel0_seen = 0;

  fam_smb1_even dut (.a(a), .b(b), .x(x), .z(z));

  task automatic apply(input int av, input int bv, input int xv);
    int exp_v;
    logic [2*N:0] exp_z;
    a = N'(av);
    b = N'(bv);
    x = N'(xv);
    #1;
    exp_v = int'(signed'(x)) * (int'(signed'(a)) + int'(signed'(b)));
    exp_z = (2*N+1)'(exp_v);
    checks++;
    if (z !== exp_z) begin
      failures++;
      if (failures <= 10)
        $display("FAIL a=%0d b=%0d x=%0d: z=%0d expected %0d", signed'(a), signed'(b),
                 signed'(x), signed'(z), exp_v);
    end
    for (int j = 0; j < ND; j++) dig_seen[mb_value(dut.dig[j]) + 2]++;
    if (|dut.u_rec.hc) hc_seen++;
    if (|dut.u_rec.sc) sc_seen++;
    if (dut.dig[ND-1].neg) top_neg_seen++;
    if (dut.u_fadd.c_lo) csel1_seen++; else csel0_seen++;
  endtask

  initial begin
    #100000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 5; i++) dig_seen[i] = 0;
    // Demonstration vector: 24 * (14 + 13) = 648.
    apply(14, 13, 24);
    if (z != 17'd648) begin
      failures++;
      $display("FAIL demonstration vector: z=%0d", z);
    end
    checks++;
    // Extremes.
    apply(-128, -128, -128);
    apply(127, 127, -128);
    apply(127, 127, 127);
    apply(-128, -128, 127);
    apply(-128, 127, 0);
    // Every combination of A, B and X.
    for (int xv = -128; xv < 128; xv++)
      for (int av = -128; av < 128; av++)
        for (int bv = -128; bv < 128; bv++)
          apply(av, bv, xv);

    for (int i = 0; i < 5; i++) begin
      $display("digit %0d seen %0d times", i - 2, dig_seen[i]);
      checks++;
      if (dig_seen[i] == 0) failures++;
    end
    $display("inter-slice HA carry %0d, ha_star carry %0d, negative top digit %0d",
             hc_seen, sc_seen, top_neg_seen);
    $display("carry-select: high-half carry-in 1 chosen %0d, 0 chosen %0d",
             csel1_seen, csel0_seen);
    checks += 5;
    if (hc_seen == 0) failures++;
    if (sc_seen == 0) failures++;
    if (top_neg_seen == 0) failures++;
    if (csel1_seen == 0) failures++;
    if (csel0_seen == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
