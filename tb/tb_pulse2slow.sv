// tb_pulse2slow: one-cycle pulses at 160 MHz must each give one one-cycle
// pulse at 40 MHz (fast to slow), and pulses at 40 MHz each one pulse at
// 160 MHz (slow to fast), with pulses at least two destination cycles apart.
module tb_pulse2slow;
  logic clk160 = 0, clk40 = 0, rst, din_f, dout_s, din_s, dout_f;
  int checks = 0, failures = 0, out_s = 0, out_f = 0, sent_f = 0, sent_s = 0;
  int hi_s = 0, hi_f = 0;
  pulse2slow dut_fs (.clk_din(clk160), .clk_dout(clk40), .rst(rst), .din(din_f), .dout(dout_s));
  pulse2slow dut_sf (.clk_din(clk40), .clk_dout(clk160), .rst(rst), .din(din_s), .dout(dout_f));
  always #3.125 clk160 = ~clk160;
  initial begin #1; forever #12.5 clk40 = ~clk40; end
  // count rising edges of the outputs and their length
  logic dout_s_q = 0, dout_f_q = 0;
  always @(posedge clk40) begin
    if (!rst) begin
      if (dout_s && !dout_s_q) out_s++;
      if (dout_s && dout_s_q) hi_s++;
    end
    dout_s_q <= dout_s;
  end
  always @(posedge clk160) begin
    if (!rst) begin
      if (dout_f && !dout_f_q) out_f++;
      if (dout_f && dout_f_q) hi_f++;
    end
    dout_f_q <= dout_f;
  end
  initial begin
    #400000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    rst = 1; din_f = 0; din_s = 0; #60; rst = 0;
    fork
      repeat (25) begin
        @(negedge clk160); din_f = 1; sent_f++;
        @(negedge clk160); din_f = 0;
        repeat ($urandom_range(12, 30)) @(negedge clk160);
      end
      repeat (25) begin
        @(negedge clk40); din_s = 1; sent_s++;
        @(negedge clk40); din_s = 0;
        repeat ($urandom_range(1, 4)) @(negedge clk40);
      end
    join
    repeat (10) @(posedge clk40);
    checks++; if (out_s != sent_f) begin failures++; $display("FAIL fast->slow: %0d out for %0d in", out_s, sent_f); end
    checks++; if (out_f != sent_s) begin failures++; $display("FAIL slow->fast: %0d out for %0d in", out_f, sent_s); end
    checks++; if (hi_s != 0) begin failures++; $display("FAIL fast->slow pulse longer than one cycle"); end
    checks++; if (hi_f != 0) begin failures++; $display("FAIL slow->fast pulse longer than one cycle"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
