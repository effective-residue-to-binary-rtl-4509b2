// tb_cla_adder: self-checking test of the carry-look-ahead adder.
// An 8-bit instance is checked exhaustively (both carry-in values); a
// 27-bit and a 49-bit instance, the widths the converter uses, are checked
// with random and carry-chain-stressing operands (all ones plus one).
module tb_cla_adder;
  int checks = 0;
  int failures = 0;

  logic [7:0]  a8, b8, s8;
  logic        ci8, co8;
  logic [26:0] a27, b27, s27;
  logic        ci27, co27;
  logic [48:0] a49, b49, s49;
  logic        ci49, co49;

  cla_adder #(.W(8))  u8  (.a(a8),  .b(b8),  .cin(ci8),  .sum(s8),  .cout(co8));
  cla_adder #(.W(27)) u27 (.a(a27), .b(b27), .cin(ci27), .sum(s27), .cout(co27));
  cla_adder #(.W(49)) u49 (.a(a49), .b(b49), .cin(ci49), .sum(s49), .cout(co49));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 512; i++) begin
      for (int j = 0; j < 256; j++) begin
        a8 = 8'(i); b8 = 8'(j); ci8 = 1'(i >> 8);
        #1;
        checks++;
        if ({co8, s8} != 9'(i % 256) + 9'(j) + 9'(ci8)) begin
          failures++;
          if (failures < 10) $display("FAIL w8 %0d+%0d+%0d -> %0d", a8, b8, ci8, {co8, s8});
        end
      end
    end
    for (int i = 0; i < 5000; i++) begin
      if (i == 0) begin
        a27 = '1; b27 = 27'd0; ci27 = 1'b1;
        a49 = '1; b49 = 49'd0; ci49 = 1'b1;
      end else if (i == 1) begin
        a27 = '1; b27 = '1; ci27 = 1'b1;
        a49 = '1; b49 = '1; ci49 = 1'b1;
      end else begin
        a27 = 27'($urandom); b27 = 27'($urandom); ci27 = 1'($urandom);
        a49 = 49'({$urandom, $urandom}); b49 = 49'({$urandom, $urandom}); ci49 = 1'($urandom);
      end
      #1;
      checks += 2;
      if ({co27, s27} != 28'(a27) + 28'(b27) + 28'(ci27)) begin
        failures++;
        $display("FAIL w27 %h+%h+%0d -> %h", a27, b27, ci27, {co27, s27});
      end
      if ({co49, s49} != 50'(a49) + 50'(b49) + 50'(ci49)) begin
        failures++;
        $display("FAIL w49 %h+%h+%0d -> %h", a49, b49, ci49, {co49, s49});
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
