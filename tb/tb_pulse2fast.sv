// tb_pulse2fast: each rising edge of a slow level gives exactly one
// one-cycle pulse in the fast clock, two fast edges after the level is seen;
// falling edges give none.
module tb_pulse2fast;
  logic clk = 0, rst, din, dout;
  int checks = 0, failures = 0, pulses = 0, rises = 0;
  pulse2fast dut (.clk_dout(clk), .rst(rst), .din(din), .dout(dout));
  always #3 clk = ~clk;
  always @(posedge clk) if (!rst && dout) pulses++;
  initial begin
    #200000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    int n;
    rst = 1; din = 0; #20; rst = 0;
    repeat (30) begin
      @(negedge clk); din = 1; rises++;
      n = 0;
      // dout must rise after exactly the second rising edge
      @(posedge clk); #0.1; checks++; if (dout) begin failures++; $display("FAIL early pulse"); end
      @(posedge clk); #0.1; checks++; if (!dout) begin failures++; $display("FAIL no pulse at edge 2"); end
      @(posedge clk); #0.1; checks++; if (dout) begin failures++; $display("FAIL pulse longer than 1 cycle"); end
      repeat ($urandom_range(2, 8)) @(negedge clk);
      din = 0;
      repeat ($urandom_range(3, 8)) @(negedge clk);
    end
    repeat (5) @(posedge clk);
    checks++;
    if (pulses != rises) begin failures++; $display("FAIL %0d pulses for %0d rising edges", pulses, rises); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
