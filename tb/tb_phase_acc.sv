// tb_phase_acc: checks the 32-bit phase accumulator against a software
// model: wrap-around addition of random and boundary frequency codes, the
// one-clock update of `result`, and the asynchronous clear (taking effect
// between clock edges).
module tb_phase_acc;
  localparam int unsigned W = 32;
  logic clk = 1'b0, aclr = 1'b1;
  logic [W-1:0] data = '0, result;
  logic [W-1:0] model;
  int checks = 0, failures = 0, wraps = 0;

  phase_acc #(.ACC_W(W)) dut (.clk(clk), .aclr(aclr), .data(data), .result(result));

  always #5 clk = ~clk;

  task automatic check(input logic [W-1:0] exp, input string what);
    checks++;
    if (result !== exp) begin
      failures++;
      $display("FAIL %s: result=%0d expected=%0d", what, result, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    model = '0;
    repeat (3) @(posedge clk);
    #1 check('0, "in clear");
    aclr = 1'b0;
    // 1 MHz code at 50 MHz: 50 steps per period, one wrap about every 50 clocks
    data = 32'd85899346;
    for (int k = 0; k < 2000; k++) begin
      @(posedge clk);
      model = model + data;
      #1 check(model, "accumulate");
      if (model < data) wraps++;
      if (k % 97 == 96) data = $urandom();
      if (k == 500) data = 32'hFFFF_FFFF;   // subtract one per clock
      if (k == 510) data = 32'h8000_0000;   // half turn per clock
      if (k == 520) data = 32'd1;           // finest step, 0.0116 Hz
    end
    // asynchronous clear between edges
    #2 aclr = 1'b1;
    #1 check('0, "async clear");
    @(posedge clk);
    #1 check('0, "held in clear");
    checks++;
    if (wraps < 10) begin
      failures++;
      $display("FAIL only %0d wraps", wraps);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
