// tb_cla_adder: test of the carry-lookahead adder at its default width (17)
// with random operands and long carry chains, and exhaustively at 6 bits
// (a full group plus a partial one), against integer addition.
module tb_cla_adder;

  int checks = 0;
  int failures = 0;

  logic [16:0] a, b, s;
  logic        ci, co;
  logic [5:0]  a6, b6, s6;
  logic        ci6, co6;

  cla_adder              dut  (.a(a), .b(b), .cin(ci), .sum(s), .cout(co));
  cla_adder #(.W(6))     dut6 (.a(a6), .b(b6), .cin(ci6), .sum(s6), .cout(co6));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [17:0] e;
    logic [6:0]  e6;
    for (int t = 0; t < 40000; t++) begin
      a  = 17'($urandom);
      b  = (t % 4 == 0) ? ~a : 17'($urandom);  // ~a: carry runs the full width
      ci = 1'($urandom);
      a6 = 6'(t); b6 = 6'(t >> 6); ci6 = 1'(t >> 12);
      #1;
      e = 18'(a) + 18'(b) + 18'(ci);
      checks++;
      if ({co, s} !== e) begin
        failures++;
        if (failures <= 10) $display("FAIL %h+%h+%b = %h expected %h", a, b, ci, {co, s}, e);
      end
      if (t < 8192) begin
        e6 = 7'(a6) + 7'(b6) + 7'(ci6);
        checks++;
        if ({co6, s6} !== e6) begin
          failures++;
          if (failures <= 10) $display("FAIL W=6 %h+%h+%b = %h expected %h", a6, b6, ci6, {co6, s6}, e6);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
