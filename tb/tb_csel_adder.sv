// tb_csel_adder: test of the carry-select final adder at its default width
// (17, split 8/9) with random operands and operands whose low half carries
// into the high half, and exhaustively at 5 bits, against integer addition.
// It also counts how often each high-half result was selected.
module tb_csel_adder;

  int checks = 0;
  int failures = 0;
  int sel1 = 0, sel0 = 0;

  logic [16:0] a, b, s;
  logic        co;
  logic [4:0]  a5, b5, s5;
  logic        co5;

  csel_adder            dut  (.a(a), .b(b), .sum(s), .cout(co));
  csel_adder #(.W(5))   dut5 (.a(a5), .b(b5), .sum(s5), .cout(co5));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [17:0] e;
    logic [5:0]  e5;
    for (int t = 0; t < 40000; t++) begin
      a = 17'($urandom);
      b = (t % 3 == 0) ? {8'($urandom), ~a[7:0] + 8'(t % 2)} : 17'($urandom);
      a5 = 5'(t); b5 = 5'(t >> 5);
      #1;
      e = 18'(a) + 18'(b);
      checks++;
      if ({co, s} !== e) begin
        failures++;
        if (failures <= 10) $display("FAIL %h+%h = %h expected %h", a, b, {co, s}, e);
      end
      if (9'(a[7:0]) + 9'(b[7:0]) > 9'd255) sel1++; else sel0++;
      if (t < 1024) begin
        e5 = 6'(a5) + 6'(b5);
        checks++;
        if ({co5, s5} !== e5) begin
          failures++;
          if (failures <= 10) $display("FAIL W=5 %h+%h = %h expected %h", a5, b5, {co5, s5}, e5);
        end
      end
    end
    $display("high half with carry-in 1 selected %0d times, with 0 %0d times", sel1, sel0);
    checks++;
    if (sel1 == 0 || sel0 == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
