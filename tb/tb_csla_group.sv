// tb_csla_group: exhaustive self-check of one carry select group at each
// width the 16-bit adder uses (2, 3, 4 and 5 bits). Every a, b and carry in
// is applied and {cout, sum} is compared with a + b + cin. Both carry-in
// values are applied, and the case where the excess-1 path has to carry out
// of a group whose zero-carry sum is all ones is reached and counted.
module tb_csla_group;
  int checks = 0, failures = 0;
  int wraps = 0;

  logic [1:0] a2, b2, s2;  logic ci2, co2;
  logic [2:0] a3, b3, s3;  logic ci3, co3;
  logic [3:0] a4, b4, s4;  logic ci4, co4;
  logic [4:0] a5, b5, s5;  logic ci5, co5;

  csla_group          dut2 (.a(a2), .b(b2), .cin(ci2), .sum(s2), .cout(co2));
  csla_group #(.N(3)) dut3 (.a(a3), .b(b3), .cin(ci3), .sum(s3), .cout(co3));
  csla_group #(.N(4)) dut4 (.a(a4), .b(b4), .cin(ci4), .sum(s4), .cout(co4));
  csla_group #(.N(5)) dut5 (.a(a5), .b(b5), .cin(ci5), .sum(s5), .cout(co5));

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
    for (int i = 0; i < (1 << 11); i++) begin
      {ci5, a5, b5} = 11'(i);
      {ci4, a4, b4} = 9'(i);
      {ci3, a3, b3} = 7'(i);
      {ci2, a2, b2} = 5'(i);
      #1;
      check({co5, s5}, a5 + b5 + ci5, $sformatf("grp5 %0d+%0d+%0d", a5, b5, ci5));
      if (ci5 && (a5 + b5 == 31)) wraps++;
      if (i < (1 << 9))
        check({co4, s4}, a4 + b4 + ci4, $sformatf("grp4 %0d+%0d+%0d", a4, b4, ci4));
      if (i < (1 << 7))
        check({co3, s3}, a3 + b3 + ci3, $sformatf("grp3 %0d+%0d+%0d", a3, b3, ci3));
      if (i < (1 << 5))
        check({co2, s2}, a2 + b2 + ci2, $sformatf("grp2 %0d+%0d+%0d", a2, b2, ci2));
    end
    // a + b = 2^N - 1 makes the 5-bit group's zero-carry result {0, 11111};
    // with cin = 1 the converter must then ripple all the way to cout.
    checks++;
    if (wraps == 0) begin
      failures++;
      $display("FAIL converter carry-out case never applied");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
