// tb_result_mux: self-checking test of the final 2-to-1 multiplexer.
// Random candidates and both select values; y must equal the chosen input.
module tb_result_mux;
  int checks = 0;
  int failures = 0;

  logic        sel;
  logic [23:0] in0, in1, y;

  result_mux #(.W(24)) dut (.sel(sel), .in0(in0), .in1(in1), .y(y));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 200; i++) begin
      in0 = 24'($urandom);
      in1 = 24'($urandom);
      sel = 1'(i);
      #1;
      checks++;
      if (y != (sel ? in1 : in0)) begin
        failures++;
        $display("FAIL sel=%0d in0=%h in1=%h y=%h", sel, in0, in1, y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
