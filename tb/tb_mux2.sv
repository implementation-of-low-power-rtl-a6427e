// tb_mux2: self-check of the 2:1 word multiplexer at its default width and
// at 6 bits. Random data words are applied with both select values; y must
// be d1 when sel is 1 and d0 when it is 0.
module tb_mux2;
  int checks = 0, failures = 0;

  logic [3:0] d0a, d1a, ya;  logic sa;
  logic [5:0] d0b, d1b, yb;  logic sb;

  mux2          dut4 (.d0(d0a), .d1(d1a), .sel(sa), .y(ya));
  mux2 #(.W(6)) dut6 (.d0(d0b), .d1(d1b), .sel(sb), .y(yb));

  initial begin : watchdog
    #1ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 200; i++) begin
      d0a = 4'($urandom); d1a = 4'($urandom); sa = i[0];
      d0b = 6'($urandom); d1b = 6'($urandom); sb = ~i[0];
      #1;
      checks += 2;
      if (ya !== (sa ? d1a : d0a)) begin
        failures++;
        $display("FAIL mux4 sel=%0b d0=%h d1=%h y=%h", sa, d0a, d1a, ya);
      end
      if (yb !== (sb ? d1b : d0b)) begin
        failures++;
        $display("FAIL mux6 sel=%0b d0=%h d1=%h y=%h", sb, d0b, d1b, yb);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
