// tb_serial_to_parallel: sends random bits with random gaps in bit_valid and
// checks that every fourth valid bit produces a one-clock symbol_strobe, that
// the symbol holds the last four bits with the first one as MSB, that the
// symbol holds between groups, and that reset clears it.
module tb_serial_to_parallel;
  logic clk = 1'b0, rst_n = 1'b0, bit_in = 1'b0, bit_valid = 1'b0;
  logic [3:0] symbol;
  logic strobe;
  int checks = 0, failures = 0, symbols = 0, gaps = 0;

  serial_to_parallel #(.BITS(4)) dut (.clk(clk), .rst_n(rst_n), .bit_in(bit_in),
                                      .bit_valid(bit_valid), .symbol(symbol),
                                      .symbol_strobe(strobe));

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [3:0] group, held;
    int nbits;
    repeat (2) @(posedge clk);
    #1;
    checks++; if (symbol != 4'd0 || strobe) failures++;
    rst_n = 1'b1;
    held = 4'd0;
    for (int g = 0; g < 300; g++) begin
      group = 4'($urandom());
      nbits = 0;
      while (nbits < 4) begin
        @(negedge clk);
        if ($urandom_range(0, 3) == 0) begin
          bit_valid = 1'b0;
          gaps++;
        end else begin
          bit_valid = 1'b1;
          bit_in = group[3 - nbits];
          nbits++;
        end
        @(posedge clk);
        #1;
        checks += 2;
        if (bit_valid && nbits == 4) begin
          if (!strobe) begin failures++; $display("FAIL no strobe in group %0d", g); end
          if (symbol != group) begin
            failures++;
            $display("FAIL symbol %b expected %b", symbol, group);
          end
          held = group;
          symbols++;
        end else begin
          if (strobe) begin failures++; $display("FAIL stray strobe"); end
          if (symbol != held) begin failures++; $display("FAIL symbol not held"); end
        end
      end
    end
    @(negedge clk);
    bit_valid = 1'b0;
    rst_n = 1'b0;
    #1;
    checks++; if (symbol != 4'd0) failures++;
    checks++;
    if (symbols != 300 || gaps == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
