// tb_csa_tree: random test of the carry-save tree at its default size
// (six 17-bit rows) and with 3, 7 and 12 rows, checking that the sum row
// plus the carry row equals the sum of all input rows modulo 2^W.
module tb_csa_tree;

  localparam int W = 17;

  int checks = 0;
  int failures = 0;

  logic [5:0][W-1:0]  r6;
  logic [2:0][W-1:0]  r3;
  logic [6:0][W-1:0]  r7;
  logic [11:0][W-1:0] r12;
  logic [W-1:0] s6, c6, s3, c3, s7, c7, s12, c12;

  csa_tree                     dut6  (.rows(r6),  .vs(s6),  .vc(c6));
  csa_tree #(.W(W), .NR(3))    dut3  (.rows(r3),  .vs(s3),  .vc(c3));
  csa_tree #(.W(W), .NR(7))    dut7  (.rows(r7),  .vs(s7),  .vc(c7));
  csa_tree #(.W(W), .NR(12))   dut12 (.rows(r12), .vs(s12), .vc(c12));

  task automatic check(input string tag, input logic [W-1:0] got, input logic [W-1:0] exp_v);
    checks++;
    if (got !== exp_v) begin
      failures++;
      if (failures <= 10) $display("FAIL %s: %h expected %h", tag, got, exp_v);
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
    logic [W-1:0] e6, e3, e7, e12;
    for (int t = 0; t < 20000; t++) begin
      e6 = '0; e3 = '0; e7 = '0; e12 = '0;
      for (int i = 0; i < 12; i++) begin
        // The first vectors use all-ones rows to force every carry.
        r12[i] = (t < 4) ? '1 : W'($urandom);
        e12 += r12[i];
        if (i < 7) begin r7[i] = r12[i] ^ W'(t); e7 += r7[i]; end
        if (i < 6) begin r6[i] = r12[i]; e6 += r6[i]; end
        if (i < 3) begin r3[i] = ~r12[i]; e3 += r3[i]; end
      end
      #1;
      check("NR=6", s6 + c6, e6);
      check("NR=3", s3 + c3, e3);
      check("NR=7", s7 + c7, e7);
      check("NR=12", s12 + c12, e12);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
