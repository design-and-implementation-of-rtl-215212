// tb_qam_sum: checks add = trunc((sin_sig + cos_sig) / 5) + 128 for every
// product pair the modulator can produce (levels +-1, +-3 times samples
// -127..127, sampled) and for random 16-bit inputs. The reference divides
// the magnitude and restores the sign, so it does not rely on the
// simulator's signed division. Hand-worked points: 3*127 + 3*127 -> 280,
// -(3*127 + 3*127) -> -24 ... both outside what a sine pair can reach, and
// -7 -> 127 (rounds toward zero).
module tb_qam_sum;
  logic signed [15:0] s, c, add;
  int checks = 0, failures = 0;

  qam_sum #(.W(16), .SCALE_DIV(5), .OFFSET(128)) dut (.sin_sig(s), .cos_sig(c), .add(add));

  function automatic int ref_add(input int x, input int y);
    int sum, mag, q;
    sum = int'(16'(x + y));
    if (sum >= 32768) sum -= 65536;
    mag = (sum < 0) ? -sum : sum;
    q = 0;
    while (mag >= 5) begin mag -= 5; q++; end
    if (sum < 0) q = -q;
    return int'(16'(q + 128));
  endfunction

  task automatic apply(input int x, input int y);
    int exp;
    s = 16'(x);
    c = 16'(y);
    #1;
    exp = ref_add(x, y);
    checks++;
    if (int'(16'(add)) != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %0d + %0d: add=%0d expected %0d", x, y, add, exp);
    end
  endtask

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int lv [4] = '{3, 1, -3, -1};
    apply(381, 381);     // 762/5 = 152 -> 280
    checks++; if (add != 280) failures++;
    apply(-381, -381);   // -152 -> -24
    checks++; if (add != -24) failures++;
    apply(-3, -4);       // -7/5 = -1 -> 127
    checks++; if (add != 127) failures++;
    apply(3, 4);         // 7/5 = 1 -> 129
    checks++; if (add != 129) failures++;
    for (int qi = 0; qi < 4; qi++)
      for (int ii = 0; ii < 4; ii++)
        for (int a = -127; a <= 127; a += 3)
          for (int b = -127; b <= 127; b += 7)
            apply(lv[qi] * a, lv[ii] * b);
    for (int k = 0; k < 20000; k++) apply(int'($urandom_range(0, 65535)) - 32768,
                                          int'($urandom_range(0, 65535)) - 32768);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
