// tb_csla_bec16_add8: the 8-bit addition workload run on the 16-bit BEC
// carry select adder.
//
// Every pair of 8-bit operands, with both carry-in values (131,072 sums),
// is applied zero-extended to 16 bits. The 9-bit result must appear in
// sum[8:0], the upper sum bits and cout must stay zero, and car1..car3 must
// equal the carries of the 8-bit sum into bits 2, 4 and 7. Group 4 (bits
// 10:7) holds the operands' bit 7 and produces the 8-bit carry as sum[8];
// its carry out car4 must stay 0. The testbench counts the sums that carry
// out of 8 bits and requires at least one.
module tb_csla_bec16_add8;
  logic [15:0] a, b, sum;
  logic        cin, cout, car1, car2, car3, car4;

  int checks = 0, failures = 0;
  int carry8 = 0;

  csla_bec16 dut (
    .a(a), .b(b), .cin(cin), .sum(sum), .cout(cout),
    .car1(car1), .car2(car2), .car3(car3), .car4(car4)
  );

  initial begin : watchdog
    #10ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int unsigned x, y, c, exp;
    for (int unsigned i = 0; i < (1 << 17); i++) begin
      x = i & 8'hFF;
      y = (i >> 8) & 8'hFF;
      c = i >> 16;
      a = 16'(x); b = 16'(y); cin = 1'(c);
      #1;
      exp = x + y + c;
      checks++;
      if ({cout, sum} !== 17'(exp)) begin
        failures++;
        $display("FAIL %0d + %0d + %0d: got %0d", x, y, c, {cout, sum});
      end
      checks++;
      if ({car1, car2, car3, car4} !==
          {1'(((x & 3) + (y & 3) + c) >> 2),
           1'(((x & 15) + (y & 15) + c) >> 4),
           1'(((x & 127) + (y & 127) + c) >> 7),
           1'b0}) begin
        failures++;
        $display("FAIL group carries for %0d + %0d + %0d", x, y, c);
      end
      if (exp > 255) carry8++;
    end
    checks++;
    if (carry8 == 0) begin
      failures++;
      $display("FAIL no 8-bit sum carried out");
    end
    $display("8-bit sums with a carry out: %0d of %0d", carry8, 1 << 17);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
