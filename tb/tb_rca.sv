// tb_rca: exhaustive self-check of the ripple carry adder at the widths
// the 16-bit adder uses (2 bits with a carry in, and 1 to 4 bits as the
// upper part of a group). Every a, b, cin is applied and {cout, sum} is
// compared with the integer sum a + b + cin.
module tb_rca;
  int checks = 0, failures = 0;

  logic [1:0] a2, b2, s2;  logic ci2, co2;
  logic [0:0] a1, b1, s1;  logic ci1, co1;
  logic [3:0] a4, b4, s4;  logic ci4, co4;

  rca             dut2 (.a(a2), .b(b2), .cin(ci2), .sum(s2), .cout(co2));
  rca #(.N(1))    dut1 (.a(a1), .b(b1), .cin(ci1), .sum(s1), .cout(co1));
  rca #(.N(4))    dut4 (.a(a4), .b(b4), .cin(ci4), .sum(s4), .cout(co4));

  task automatic check(int unsigned got, int unsigned exp, string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin : watchdog
    #1ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < (1 << 9); i++) begin
      {ci4, a4, b4} = 9'(i);
      {ci2, a2, b2} = 5'(i);
      {ci1, a1, b1} = 3'(i);
      #1;
      check({co4, s4}, a4 + b4 + ci4, $sformatf("rca4 %0d+%0d+%0d", a4, b4, ci4));
      if (i < (1 << 5))
        check({co2, s2}, a2 + b2 + ci2, $sformatf("rca2 %0d+%0d+%0d", a2, b2, ci2));
      if (i < (1 << 3))
        check({co1, s1}, a1 + b1 + ci1, $sformatf("rca1 %0d+%0d+%0d", a1, b1, ci1));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
