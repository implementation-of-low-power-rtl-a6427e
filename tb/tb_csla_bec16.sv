// tb_csla_bec16: end-to-end self-check of the 16-bit BEC carry select adder
// at its only (full) size.
//
// Applied vectors: the operand pair published with the reference design
// (a = 1001000011111011, b = 0101010101111010, cin = 0, giving
// sum = 1110011001110101, cout = 0 and group carries 1, 1, 1, 0), a set of
// corner cases, and random operands. sum and cout are compared with the
// integer a + b + cin, and car1..car4 with the carry of a + b + cin into
// bits 2, 4, 7 and 11, computed on the operands' low bits.
//
// Mechanisms counted, each of which must occur at least once per group 2..5:
//   - carry select on the excess-1 path (carry into the group is 1),
//   - carry select on the zero-carry path (carry into the group is 0),
//   - excess-1 carry out: the group's own bits add to all ones and the
//     carry into it is 1, so its carry out comes from the converter alone.
// A full-length propagate (a + b = 0xFFFF, cin = 1) is also required.
module tb_csla_bec16;
  localparam int unsigned LSB [5] = '{0, 2, 4, 7, 11};
  localparam int unsigned GW  [5] = '{2, 2, 3, 4, 5};
  localparam int unsigned NRAND = 200000;

  logic [15:0] a, b, sum;
  logic        cin, cout, car1, car2, car3, car4;

  int checks = 0, failures = 0;
  int sel_inc [5];
  int sel_dir [5];
  int bec_cout [5];
  int full_prop = 0;

  csla_bec16 dut (
    .a(a), .b(b), .cin(cin), .sum(sum), .cout(cout),
    .car1(car1), .car2(car2), .car3(car3), .car4(car4)
  );

  // Carry into bit position pos of a + b + cin.
  function automatic bit carry_into(int unsigned pos);
    int unsigned m = (1 << pos) - 1;
    return 1'(((a & m) + (b & m) + cin) >> pos);
  endfunction

  task automatic apply(logic [15:0] va, logic [15:0] vb, logic vc);
    int unsigned exp, mg;
    a = va; b = vb; cin = vc;
    #1;
    exp = a + b + cin;
    checks++;
    if ({cout, sum} !== 17'(exp)) begin
      failures++;
      $display("FAIL %h + %h + %0b: got %0b_%h expected %h", a, b, cin, cout, sum, exp);
    end
    checks++;
    if ({car1, car2, car3, car4} !==
        {carry_into(2), carry_into(4), carry_into(7), carry_into(11)}) begin
      failures++;
      $display("FAIL group carries for %h + %h + %0b: got %b%b%b%b", a, b, cin,
               car1, car2, car3, car4);
    end
    for (int g = 1; g < 5; g++) begin
      mg = (1 << GW[g]) - 1;
      if (carry_into(LSB[g])) begin
        sel_inc[g]++;
        if ((((a >> LSB[g]) & mg) + ((b >> LSB[g]) & mg)) == mg) bec_cout[g]++;
      end else begin
        sel_dir[g]++;
      end
    end
    if (a + b == 32'hFFFF && cin) full_prop++;
  endtask

  task automatic require(int count, string what);
    checks++;
    if (count == 0) begin
      failures++;
      $display("FAIL mechanism never exercised: %s", what);
    end
  endtask

  initial begin : watchdog
    #10ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int g = 0; g < 5; g++) begin
      sel_inc[g] = 0; sel_dir[g] = 0; bec_cout[g] = 0;
    end

    // Published reference vector, with its published results.
    apply(16'b1001000011111011, 16'b0101010101111010, 1'b0);
    checks++;
    if (sum !== 16'b1110011001110101 || cout !== 1'b0 ||
        {car1, car2, car3, car4} !== 4'b1110) begin
      failures++;
      $display("FAIL reference vector: sum=%b cout=%b car=%b%b%b%b",
               sum, cout, car1, car2, car3, car4);
    end

    // Corner cases.
    apply(16'h0000, 16'h0000, 1'b0);
    apply(16'h0000, 16'h0000, 1'b1);
    apply(16'hFFFF, 16'h0000, 1'b1);
    apply(16'h0000, 16'hFFFF, 1'b1);
    apply(16'hFFFF, 16'hFFFF, 1'b0);
    apply(16'hFFFF, 16'hFFFF, 1'b1);
    apply(16'hAAAA, 16'h5555, 1'b1);
    apply(16'h8000, 16'h8000, 1'b0);
    // Each group's bits all ones, with a carry generated just below it.
    apply(16'h0003, 16'h0001, 1'b0);
    apply(16'h000F, 16'h0001, 1'b0);
    apply(16'h007F, 16'h0001, 1'b0);
    apply(16'h07FF, 16'h0001, 1'b0);
    // Exhaustive over the two low groups plus carry in.
    for (int i = 0; i < (1 << 9); i++) apply(16'(i[3:0]), 16'(i[7:4]), i[8]);
    // Random operands.
    for (int unsigned i = 0; i < NRAND; i++)
      apply(16'($urandom), 16'($urandom), 1'($urandom));

    for (int g = 1; g < 5; g++) begin
      require(sel_inc[g],  $sformatf("group %0d selects excess-1 result", g + 1));
      require(sel_dir[g],  $sformatf("group %0d selects zero-carry result", g + 1));
      require(bec_cout[g], $sformatf("group %0d carry out from converter", g + 1));
      $display("group %0d: excess-1 selected %0d, zero-carry selected %0d, converter carry out %0d",
               g + 1, sel_inc[g], sel_dir[g], bec_cout[g]);
    end
    require(full_prop, "carry propagated through all 16 bits");
    $display("full-length propagate: %0d", full_prop);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
