// tb_qam_constant: applies all 16 symbols and compares I and Q with the
// constellation table (symbol -> Q, I):
//   0000 +3 +3, 0001 +3 +1, 0010 +3 -3, 0011 +3 -1,
//   0100 -3 +3, 0101 -3 +1, 0110 -3 -3, 0111 -3 -1,
//   1000 +1 +3, 1001 +1 +1, 1010 +1 -3, 1011 +1 -1,
//   1100 -1 +3, 1101 -1 +1, 1110 -1 -3, 1111 -1 -1.
module tb_qam_constant;
  import qam16_pkg::*;
  logic [3:0] sym;
  sample_t i_level, q_level;
  int checks = 0, failures = 0;
  int exp_q [16] = '{3, 3, 3, 3, -3, -3, -3, -3, 1, 1, 1, 1, -1, -1, -1, -1};
  int exp_i [16] = '{3, 1, -3, -1, 3, 1, -3, -1, 3, 1, -3, -1, 3, 1, -3, -1};

  qam_constant dut (.b01(sym[1:0]), .b23(sym[3:2]), .i_level(i_level), .q_level(q_level));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int s = 0; s < 16; s++) begin
      sym = 4'(s);
      #1;
      checks += 2;
      if (int'(i_level) != exp_i[s]) begin
        failures++;
        $display("FAIL symbol %b: I=%0d expected %0d", sym, i_level, exp_i[s]);
      end
      if (int'(q_level) != exp_q[s]) begin
        failures++;
        $display("FAIL symbol %b: Q=%0d expected %0d", sym, q_level, exp_q[s]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
