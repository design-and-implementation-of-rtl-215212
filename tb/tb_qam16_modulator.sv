// tb_qam16_modulator: end-to-end test of the QAM-16 modulator at its
// default parameters (50 MHz clock, 1 MHz carrier, 32-bit accumulator,
// 8192-entry tables, divisor 5).
//
// Serial data is sent at 4 kbit/s (one bit_valid pulse every 12500 clocks),
// so the modulator changes symbol at 1 kHz and each symbol lasts 1000 carrier
// periods. All 16 symbols are sent in order, then a few random ones, then a
// reset in mid-stream. Checks:
//  * every clock, qamk against trunc((Q*s + I*c)/5) + 128, where s and c are
//    127*sin/cos (truncated) of the phase a model accumulator held two clocks
//    earlier and I, Q come from the constellation table below;
//  * the symbol register against the bits sent (first bit = MSB);
//  * per symbol, the amplitude and phase of the output, found by correlating
//    it with ideal sine and cosine carriers, against the constellation table:
//    phase atan2(Q, I) within 1.5 degrees and amplitude 127*sqrt(I^2+Q^2)/5
//    within 3 %;
//  * the carrier frequency: 1000 rising zero crossings of sin_out per symbol.
// Mechanisms counted (each must occur): symbol updates, each of the 16
// symbols, accumulator wrap-around, the three amplitude rings (sqrt 2,
// sqrt 10, sqrt 18), reset during operation.
module tb_qam16_modulator;
  localparam int BIT_CLOCKS = 12500;      // 50 MHz / 4 kHz
  localparam int SYM_CLOCKS = 4 * BIT_CLOCKS;
  localparam real PI = 3.14159265358979323846;

  // constellation: symbol -> (Q, I) and phase in degrees
  int  tab_q [16] = '{3, 3, 3, 3, -3, -3, -3, -3, 1, 1, 1, 1, -1, -1, -1, -1};
  int  tab_i [16] = '{3, 1, -3, -1, 3, 1, -3, -1, 3, 1, -3, -1, 3, 1, -3, -1};
  real tab_ph [16] = '{45.0, 71.6, 135.0, 108.4, 315.0, 288.4, 225.0, 251.6,
                       18.4, 45.0, 161.6, 135.0, 341.6, 315.0, 198.4, 225.0};

  logic clk = 1'b0, rst_n = 1'b0, bit_in = 1'b0, bit_valid = 1'b0;
  logic [3:0] symbol;
  logic symbol_strobe;
  logic signed [7:0] sin_out, cos_out;
  logic signed [15:0] qam_sum;
  logic [7:0] qamk;

  int checks = 0, failures = 0;
  int n_strobes = 0, n_wraps = 0, n_resets = 0, n_sym_checked = 0;
  int seen [16];
  int ring_seen [3];

  // reference state
  logic [31:0] acc, acc_d1, acc_d2;
  logic [3:0]  exp_sym;
  bit          checking = 0;

  // per-symbol correlation
  real corr_s, corr_c;
  int  corr_n, rises;
  logic signed [7:0] prev_sin;

  qam16_modulator dut (
    .clk(clk), .rst_n(rst_n), .bit_in(bit_in), .bit_valid(bit_valid),
    .symbol(symbol), .symbol_strobe(symbol_strobe),
    .sin_out(sin_out), .cos_out(cos_out), .qam_sum(qam_sum), .qamk(qamk)
  );

  always #10 clk = ~clk;

  function automatic int trunc_r(input real v);
    return (v >= 0.0) ? int'($floor(v)) : -int'($floor(-v));
  endfunction

  function automatic int div5(input int v);   // toward zero
    return (v >= 0) ? v / 5 : -((-v) / 5);
  endfunction

  always @(posedge clk or negedge rst_n) begin
    if (!rst_n) acc <= '0;
    else begin
      if (acc + 32'd85899346 < acc) n_wraps++;
      acc <= acc + 32'd85899346;
    end
  end
  always @(posedge clk) begin
    acc_d1 <= acc;
    acc_d2 <= acc_d1;
  end

  always @(posedge clk) begin
    real ph;
    int s, c, exp_q;
    #1;
    if (checking) begin
      ph = 2.0 * PI * real'(acc_d2[31:19]) / 8192.0;
      s = trunc_r(127.0 * $sin(ph));
      c = trunc_r(127.0 * $cos(ph));
      exp_q = div5(tab_q[exp_sym] * s + tab_i[exp_sym] * c) + 128;
      checks += 2;
      if (int'(qamk) != exp_q || symbol != exp_sym) begin
        failures++;
        if (failures < 10)
          $display("FAIL t=%0t sym=%b (exp %b) qamk=%0d expected %0d", $time, symbol, exp_sym,
                   qamk, exp_q);
      end
      ph = 2.0 * PI * real'(acc_d2) / 4294967296.0;
      corr_s += (real'(qamk) - 128.0) * $sin(ph);
      corr_c += (real'(qamk) - 128.0) * $cos(ph);
      corr_n++;
      if (prev_sin < 0 && sin_out >= 0) rises++;
    end
    prev_sin = sin_out;
    if (symbol_strobe) n_strobes++;
  end

  // The symbol register changes on the last bit of a group, so a symbol is
  // on the air from its own last bit to the last bit of the next group; it
  // is judged just before that bit.
  bit judge_pending = 0;

  task automatic send_symbol(input logic [3:0] sym);
    for (int b = 3; b >= 0; b--) begin
      if (b == 0 && judge_pending) judge_symbol(exp_sym);
      @(negedge clk);
      bit_in = sym[b];
      bit_valid = 1'b1;
      @(posedge clk);
      if (b == 0) begin
        judge_pending = 1;
        exp_sym = sym;   // updated on the edge that sampled the last bit
        corr_s = 0.0; corr_c = 0.0; corr_n = 0; rises = 0;
      end
      @(negedge clk);
      bit_valid = 1'b0;
      repeat (BIT_CLOCKS - 2) @(negedge clk);
    end
  endtask

  task automatic judge_symbol(input logic [3:0] sym);
    real i_est, q_est, amp, ph, exp_amp, dph;
    i_est = 2.0 * corr_c / real'(corr_n);
    q_est = 2.0 * corr_s / real'(corr_n);
    amp = $sqrt(i_est * i_est + q_est * q_est);
    ph = $atan2(q_est, i_est) * 180.0 / PI;
    if (ph < 0.0) ph += 360.0;
    exp_amp = 127.0 * $sqrt(real'(tab_i[sym] * tab_i[sym] + tab_q[sym] * tab_q[sym])) / 5.0;
    dph = ph - tab_ph[sym];
    if (dph > 180.0) dph -= 360.0;
    if (dph < -180.0) dph += 360.0;
    checks += 3;
    if (dph > 1.5 || dph < -1.5) begin
      failures++;
      $display("FAIL symbol %b: phase %0.2f expected %0.1f", sym, ph, tab_ph[sym]);
    end
    if (amp < 0.97 * exp_amp || amp > 1.03 * exp_amp) begin
      failures++;
      $display("FAIL symbol %b: amplitude %0.2f expected %0.2f", sym, amp, exp_amp);
    end
    if (rises < 999 || rises > 1001) begin
      failures++;
      $display("FAIL symbol %b: %0d carrier periods, expected 1000", sym, rises);
    end
    $display("symbol %b: phase %6.2f deg (table %5.1f), amplitude %6.2f (expected %6.2f), %0d periods",
             sym, ph, tab_ph[sym], amp, exp_amp, rises);
    seen[sym]++;
    n_sym_checked++;
    case (tab_i[sym] * tab_i[sym] + tab_q[sym] * tab_q[sym])
      2:  ring_seen[0]++;
      10: ring_seen[1]++;
      18: ring_seen[2]++;
      default: ;
    endcase
  endtask

  initial begin
    #(64'd20 * 64'd3_000_000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [3:0] sym;
    exp_sym = 4'd0;
    repeat (4) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    checking = 1;
    for (int k = 0; k < 20; k++) begin
      sym = (k < 16) ? 4'(k) : 4'($urandom());
      send_symbol(sym);
    end
    repeat (3 * BIT_CLOCKS) @(negedge clk);
    judge_symbol(exp_sym);
    judge_pending = 0;
    // reset during operation: symbol returns to 0000, carrier to phase 0
    @(negedge clk);
    checking = 0;
    rst_n = 1'b0;
    exp_sym = 4'd0;
    repeat (3) @(negedge clk);
    checks += 2;
    if (symbol != 4'd0 || qamk != 8'(128 + div5(3 * 0 + 3 * 127))) begin
      failures++;
      $display("FAIL in reset: symbol=%b qamk=%0d", symbol, qamk);
    end
    n_resets++;
    rst_n = 1'b1;
    checking = 1;
    send_symbol(4'b1001);
    repeat (3 * BIT_CLOCKS) @(negedge clk);
    judge_symbol(exp_sym);

    // every mechanism must have happened
    checks++;
    if (n_strobes != 21) begin failures++; $display("FAIL %0d symbol updates", n_strobes); end
    for (int s = 0; s < 16; s++) begin
      checks++;
      if (seen[s] == 0) begin failures++; $display("FAIL symbol %0d never sent", s); end
    end
    for (int r = 0; r < 3; r++) begin
      checks++;
      if (ring_seen[r] == 0) begin failures++; $display("FAIL ring %0d never used", r); end
    end
    checks += 2;
    if (n_wraps < 1000) begin failures++; $display("FAIL %0d wraps", n_wraps); end
    if (n_resets != 1) failures++;
    $display("symbol updates %0d, symbols judged %0d, accumulator wraps %0d, resets %0d",
             n_strobes, n_sym_checked, n_wraps, n_resets);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
