// tb_crossclock: a level changed in the source clock must appear on DOUT
// after exactly two rising edges of the destination clock (counted from the
// source edge that registers it), with no glitches in between.
module tb_crossclock;
  logic clk_din = 0, clk_dout = 0, rst, din, dout;
  int checks = 0, failures = 0;
  crossclock dut (.clk_din(clk_din), .clk_dout(clk_dout), .rst(rst), .din(din), .dout(dout));
  always #10 clk_din = ~clk_din;                 // rising edges at 10, 30, 50 ...
  initial begin #1; forever #3 clk_dout = ~clk_dout; end  // rising edges at 4, 10+.. offset
  initial begin
    #200000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    logic level;
    int n;
    rst = 1; din = 0; #25; rst = 0;
    checks++; if (dout !== 0) begin failures++; $display("FAIL reset"); end
    level = 0;
    repeat (40) begin
      repeat (1 + $urandom_range(0, 3)) @(negedge clk_din);
      level = ~level; din = level;
      @(posedge clk_din);  // the first stage takes the new level here
      n = 0;
      while (dout !== level && n < 10) begin
        @(posedge clk_dout); #0.1;
        n++;
      end
      checks++;
      if (n != 2) begin failures++; $display("FAIL latency %0d destination edges, expected 2", n); end
      repeat (6) begin
        @(posedge clk_dout); #0.1;
        checks++; if (dout !== level) begin failures++; $display("FAIL level not held"); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
