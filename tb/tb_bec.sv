// tb_bec: exhaustive self-check of the binary to excess-1 converter at the
// four widths the 16-bit adder uses (3, 4, 5 and 6 bits). Every input is
// applied and x is compared with (b + 1) mod 2^N. The rows of the 4-bit
// function table that fix the ends (0000 -> 0001, 0001 -> 0010,
// 1110 -> 1111, 1111 -> 0000) are also checked as literal values.
module tb_bec;
  int checks = 0, failures = 0;

  logic [2:0] b3, x3;
  logic [3:0] b4, x4;
  logic [4:0] b5, x5;
  logic [5:0] b6, x6;

  bec #(.N(3)) dut3 (.b(b3), .x(x3));
  bec          dut4 (.b(b4), .x(x4));
  bec #(.N(5)) dut5 (.b(b5), .x(x5));
  bec #(.N(6)) dut6 (.b(b6), .x(x6));

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
    for (int i = 0; i < 64; i++) begin
      b6 = 6'(i); b5 = 5'(i); b4 = 4'(i); b3 = 3'(i);
      #1;
      check(x6, (i + 1) % 64, $sformatf("bec6 %0d", i));
      if (i < 32) check(x5, (i + 1) % 32, $sformatf("bec5 %0d", i));
      if (i < 16) check(x4, (i + 1) % 16, $sformatf("bec4 %0d", i));
      if (i < 8)  check(x3, (i + 1) % 8,  $sformatf("bec3 %0d", i));
    end
    b4 = 4'b0000; #1; check(x4, 4'b0001, "table 0000");
    b4 = 4'b0001; #1; check(x4, 4'b0010, "table 0001");
    b4 = 4'b1110; #1; check(x4, 4'b1111, "table 1110");
    b4 = 4'b1111; #1; check(x4, 4'b0000, "table 1111");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
