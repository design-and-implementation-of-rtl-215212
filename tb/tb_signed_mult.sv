// tb_signed_mult: exhaustive check of the 8 x 8 signed multiplier, all
// 65536 operand pairs against integer multiplication.
module tb_signed_mult;
  logic signed [7:0] a, b;
  logic signed [15:0] p;
  int checks = 0, failures = 0;

  signed_mult #(.A_W(8), .B_W(8)) dut (.a(a), .b(b), .p(p));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int x = -128; x < 128; x++) begin
      for (int y = -128; y < 128; y++) begin
        a = 8'(x);
        b = 8'(y);
        #1;
        checks++;
        if (int'(p) != x * y) begin
          failures++;
          if (failures < 10) $display("FAIL %0d * %0d = %0d", x, y, p);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
