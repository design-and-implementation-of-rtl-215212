// tb_wave_rom: reads every word of the 8192 x 8 sine and cosine tables and
// compares it with 127*sin(2*pi*i/8192) (cos) truncated toward zero plus 128,
// computed here independently, plus a few hand-worked entries
// (0 deg -> 128/255, 45 deg -> 217, 90 deg -> 255/128, 270 deg -> 1/128).
// It also checks the one-clock read latency.
module tb_wave_rom;
  import qam16_pkg::*;
  localparam int unsigned AW = 13;
  localparam int unsigned DEPTH = 2 ** AW;
  logic clk = 1'b0;
  logic [AW-1:0] addr = '0;
  logic [7:0] q_sin, q_cos;
  int checks = 0, failures = 0;

  wave_rom #(.ADDR_W(AW), .DATA_W(8), .WAVE(WAVE_SIN)) u_sin (.clk(clk), .address(addr), .q(q_sin));
  wave_rom #(.ADDR_W(AW), .DATA_W(8), .WAVE(WAVE_COS)) u_cos (.clk(clk), .address(addr), .q(q_cos));

  always #5 clk = ~clk;

  function automatic int ref_val(input int i, input bit is_cos);
    real deg, rad, v;
    deg = 360.0 * i / 8192.0;
    rad = deg * 3.14159265358979323846 / 180.0;
    v = 127.0 * (is_cos ? $cos(rad) : $sin(rad));
    // integer part toward zero
    return ((v >= 0.0) ? int'($floor(v)) : -int'($floor(-v))) + 128;
  endfunction

  task automatic cmp(input int got, input int exp, input string what, input int i);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s[%0d]: got %0d expected %0d", what, i, got, exp);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(negedge clk);
    for (int i = 0; i < DEPTH; i++) begin
      addr = AW'(i);
      @(posedge clk);
      #1;
      cmp(int'(q_sin), ref_val(i, 1'b0), "sin", i);
      cmp(int'(q_cos), ref_val(i, 1'b1), "cos", i);
      // hand-worked points
      if (i == 0)    begin cmp(int'(q_sin), 128, "sin0", i);   cmp(int'(q_cos), 255, "cos0", i);   end
      if (i == 1024) begin cmp(int'(q_sin), 217, "sin45", i);  cmp(int'(q_cos), 217, "cos45", i);  end
      if (i == 2048) begin cmp(int'(q_sin), 255, "sin90", i);  cmp(int'(q_cos), 128, "cos90", i);  end
      if (i == 6144) begin cmp(int'(q_sin), 1, "sin270", i);   cmp(int'(q_cos), 128, "cos270", i); end
    end
    // latency: the output changes only on the clock edge after the address
    @(negedge clk);
    addr = 13'd2048;
    @(posedge clk);
    #1;
    addr = 13'd6144;
    #2 cmp(int'(q_sin), 255, "latency_hold", 2048);
    @(posedge clk);
    #1 cmp(int'(q_sin), 1, "latency_update", 6144);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
