// tb_csa_3to2: self-checking test of one carry-save row.
// Random and extreme operands; checks a + b + c == sum + 2*carry exactly.
module tb_csa_3to2;
  int checks = 0;
  int failures = 0;

  logic [26:0] a, b, c, s, cy;

  csa_3to2 #(.W(27)) dut (.a(a), .b(b), .c(c), .sum(s), .carry(cy));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 2000; i++) begin
      if (i == 0) begin a = '1; b = '1; c = '1; end
      else if (i == 1) begin a = '0; b = '0; c = '0; end
      else begin a = 27'($urandom); b = 27'($urandom); c = 27'($urandom); end
      #1;
      checks++;
      if (64'(a) + 64'(b) + 64'(c) != 64'(s) + 2 * 64'(cy)) begin
        failures++;
        $display("FAIL a=%h b=%h c=%h s=%h cy=%h", a, b, c, s, cy);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
