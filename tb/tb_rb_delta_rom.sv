// tb_rb_delta_rom: self-checking test of the r_B x delta block.
// Case-1 instance: base {32,31,29,27,19}, delta = 2^24 - 14757984.
// Case-2 instance: 11-modulus base, delta = 144403552893600 - 2^47, output
// in one's complement. Every r_B code is checked against delta*r_B.
module tb_rb_delta_rom;
  int checks = 0;
  int failures = 0;

  localparam longint unsigned D1 = 64'd16777216 - 64'd14757984;
  localparam longint unsigned D3 = 64'd144403552893600 - 64'd140737488355328;

  logic [2:0]  rb1;
  logic [24:0] d1;
  logic [3:0]  rb3;
  logic [48:0] d3;

  rb_delta_rom #(.DELTA(D1), .NEGATE(1'b0), .RBW(3), .L(25)) u1 (.rb(rb1), .d(d1));
  rb_delta_rom #(.DELTA(D3), .NEGATE(1'b1), .RBW(4), .L(49)) u3 (.rb(rb3), .d(d3));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r < 16; r++) begin
      rb1 = 3'(r);
      rb3 = 4'(r);
      #1;
      if (r < 8) begin
        checks++;
        if (d1 != 25'(D1 * longint'(r))) begin
          failures++;
          $display("FAIL case1 r=%0d d=%0d", r, d1);
        end
      end
      checks++;
      if (49'(~d3) != 49'(D3 * longint'(r))) begin
        failures++;
        $display("FAIL case2 r=%0d ~d=%0d", r, 49'(~d3));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
