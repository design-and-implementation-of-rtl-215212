// tb_qddfs: runs the quadrature synthesizer with the 1 MHz code
// (85899346 at 50 MHz) and then with random codes. Every clock it compares
// sin_out/cos_out with 127*sin/cos of the phase the model accumulator held
// two clocks earlier (top 13 bits, truncated toward zero), counts rising
// zero crossings of the sine to confirm 1 MHz (one per 50 clocks), checks the
// 90 degree lead of cosine over sine (the cosine falls through zero three
// quarters of a period, 37-38 clocks, before the sine next rises), checks the
// upper end of the frequency range (10 MHz: 200 crossings in 1000 clocks;
// 25 MHz: samples alternate in sign) and checks that reset returns the
// outputs to the phase-0 values.
module tb_qddfs;
  logic clk = 1'b0, rst = 1'b0;
  logic [31:0] code = 32'd85899346;
  logic signed [7:0] sin_o, cos_o;
  logic [31:0] acc, acc_d1, acc_d2;
  int checks = 0, failures = 0;
  int cycles = 0, sin_rises = 0, last_sin_rise = -1, last_cos_fall = -1, lead_checks = 0;
  logic signed [7:0] prev_sin, prev_cos;
  bit running = 0;
  logic signed [7:0] prev_cos_25 = '0, prev_sin_25 = '0;

  qddfs #(.ACC_W(32), .ADDR_W(13), .SAMPLE_W(8)) dut (.clk(clk), .rst(rst), .code_f(code),
                                                      .sin_out(sin_o), .cos_out(cos_o));

  always #10 clk = ~clk;   // 50 MHz

  function automatic int ref_s(input logic [31:0] ph, input bit is_cos);
    real v;
    v = 127.0 * (is_cos ? $cos(6.283185307179586 * real'(ph[31:19]) / 8192.0)
                        : $sin(6.283185307179586 * real'(ph[31:19]) / 8192.0));
    return (v >= 0.0) ? int'($floor(v)) : -int'($floor(-v));
  endfunction

  // model of the accumulator and the two-clock pipeline
  always @(posedge clk or negedge rst) begin
    if (!rst) begin
      acc <= '0;
    end else begin
      acc <= acc + code;
    end
  end
  always @(posedge clk) begin
    acc_d1 <= acc;
    acc_d2 <= acc_d1;
  end

  always @(posedge clk) begin
    #1;
    if (running) begin
      cycles++;
      checks += 2;
      if (int'(sin_o) != ref_s(acc_d2, 1'b0) || int'(cos_o) != ref_s(acc_d2, 1'b1)) begin
        failures++;
        if (failures < 10)
          $display("FAIL cycle %0d: sin=%0d cos=%0d expected %0d %0d", cycles, sin_o, cos_o,
                   ref_s(acc_d2, 1'b0), ref_s(acc_d2, 1'b1));
      end
      if (prev_sin < 0 && sin_o >= 0) begin
        sin_rises++;
        last_sin_rise = cycles;
        // cosine peaks where sine rises; it fell through zero a quarter period earlier
        if (code == 32'd85899346 && last_cos_fall >= 0) begin
          checks++;
          lead_checks++;
          if (!(cycles - last_cos_fall inside {[36:39]})) begin
            failures++;
            $display("FAIL quadrature: cos fell at %0d, sin rose at %0d", last_cos_fall, cycles);
          end
        end
      end
      if (prev_cos >= 0 && cos_o < 0) last_cos_fall = cycles;
    end
    prev_sin = sin_o;
    prev_cos = cos_o;
  end

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (4) @(posedge clk);
    #2;
    checks += 2;
    if (sin_o != 0 || cos_o != 127) begin
      failures++;
      $display("FAIL in reset: sin=%0d cos=%0d", sin_o, cos_o);
    end
    @(negedge clk);
    rst = 1'b1;
    @(negedge clk);
    running = 1;
    repeat (5000) @(posedge clk);   // 100 us = 100 carrier periods
    #2;
    checks++;
    if (sin_rises < 99 || sin_rises > 101) begin
      failures++;
      $display("FAIL frequency: %0d rising crossings in 5000 clocks, expected 100", sin_rises);
    end
    checks++;
    if (lead_checks < 90) failures++;
    // random codes, including slow ones
    for (int k = 0; k < 20; k++) begin
      @(negedge clk);
      code = (k % 2) ? $urandom() : $urandom_range(1, 1 << 24);
      repeat (200) @(posedge clk);
    end
    // upper end of the frequency range: 10 MHz (code 858993459, 5 clocks
    // per period) and 25 MHz (code 2^31: every sample is the negative of the one before)
    @(negedge clk);
    code = 32'd858993459;
    repeat (5) @(posedge clk);
    sin_rises = 0;
    repeat (1000) @(posedge clk);
    #2;
    checks++;
    if (sin_rises < 199 || sin_rises > 201) begin
      failures++;
      $display("FAIL 10 MHz: %0d rising crossings in 1000 clocks, expected 200", sin_rises);
    end
    @(negedge clk);
    code = 32'h8000_0000;
    repeat (3) @(posedge clk);
    for (int k = 0; k < 20; k++) begin
      @(posedge clk);
      #2;
      checks++;
      if (k > 0 && (cos_o != -prev_cos_25 || sin_o != -prev_sin_25)) begin
        failures++;
        $display("FAIL 25 MHz: cos %0d after %0d", cos_o, prev_cos_25);
      end
      prev_cos_25 = cos_o;
      prev_sin_25 = sin_o;
    end
    // reset returns to phase 0
    @(negedge clk);
    running = 0;
    rst = 1'b0;
    repeat (3) @(posedge clk);
    #2;
    checks += 2;
    if (sin_o != 0 || cos_o != 127) begin
      failures++;
      $display("FAIL after reset: sin=%0d cos=%0d", sin_o, cos_o);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
