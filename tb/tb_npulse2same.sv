// tb_npulse2same: an input pulse must give an output pulse exactly NPULSE
// cycles long (50, as used for the FIFO resets, and other lengths); a new
// input pulse restarts the count; NPULSE = 0 gives nothing.
module tb_npulse2same;
  logic clk = 0, rst, din, dout;
  logic [15:0] npulse;
  int checks = 0, failures = 0;
  npulse2same #(.CNT_W(16)) dut (.clk_dout(clk), .rst(rst), .npulse(npulse), .din(din), .dout(dout));
  always #3 clk = ~clk;
  initial begin
    #500000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  task automatic measure(input int n, input int exp);
    int len;
    npulse = 16'(n);
    @(negedge clk); din = 1; @(negedge clk); din = 0;
    len = 0;
    // the output rose with the edge that sampled din; count its high cycles
    while (dout) begin len++; @(negedge clk); end
    checks++;
    if (len != exp) begin failures++; $display("FAIL npulse=%0d: %0d cycles, expected %0d", n, len, exp); end
    repeat (3) @(negedge clk);
  endtask
  initial begin
    int len;
    rst = 1; din = 0; npulse = 50; #20; rst = 0;
    checks++; if (dout) begin failures++; $display("FAIL after reset"); end
    measure(50, 50);
    measure(1, 1);
    measure(7, 7);
    measure(0, 0);
    // retrigger: second pulse 20 cycles into a 50-cycle pulse
    npulse = 50;
    @(negedge clk); din = 1; @(negedge clk); din = 0;
    repeat (19) @(negedge clk);
    din = 1; @(negedge clk); din = 0;
    len = 0;
    while (dout) begin len++; @(negedge clk); end
    checks++;
    if (len != 50) begin failures++; $display("FAIL retrigger: %0d cycles after restart", len); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
