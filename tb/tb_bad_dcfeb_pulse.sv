// tb_bad_dcfeb_pulse: per DCFEB, a long-packet error or a rising fiber error
// at 160 MHz must give one clk40 pulse and a 50-cycle clk160 pulse; a killed
// DCFEB gives nothing; a fiber error held high gives one pulse only; with
// IS_SIMULATION = 1 fiber errors are ignored.
module tb_bad_dcfeb_pulse;
  localparam int NFEB = 7;
  logic clk160 = 0, clk40 = 0, reset;
  logic [NFEB-1:0] long_packet, fiber_err, kill;
  logic [NFEB-1:0] p160, bad, bad_long, p160_s, bad_s, bad_long_s;
  int checks = 0, failures = 0;
  int n40 [NFEB], nlong [NFEB], n40_s [NFEB];
  logic [NFEB-1:0] bad_q;

  bad_dcfeb_pulse #(.NFEB(NFEB), .IS_SIMULATION(1'b0), .LONG_PULSE(50)) dut (
    .clk160(clk160), .clk40(clk40), .reset(reset), .long_packet(long_packet),
    .fiber_err(fiber_err), .kill(kill), .pulse160(p160), .bad_pulse(bad), .bad_pulse_long(bad_long));
  bad_dcfeb_pulse #(.NFEB(NFEB), .IS_SIMULATION(1'b1), .LONG_PULSE(50)) dut_sim (
    .clk160(clk160), .clk40(clk40), .reset(reset), .long_packet(long_packet),
    .fiber_err(fiber_err), .kill(kill), .pulse160(p160_s), .bad_pulse(bad_s), .bad_pulse_long(bad_long_s));

  always #3.125 clk160 = ~clk160;
  initial begin #1; forever #12.5 clk40 = ~clk40; end

  always @(posedge clk40) if (!reset) for (int i = 0; i < NFEB; i++) begin
    if (bad[i]) n40[i]++;
    if (bad_s[i]) n40_s[i]++;
  end
  always @(posedge clk160) if (!reset) for (int i = 0; i < NFEB; i++) if (bad_long[i]) nlong[i]++;

  task automatic clear_counts();
    for (int i = 0; i < NFEB; i++) begin n40[i] = 0; nlong[i] = 0; n40_s[i] = 0; end
  endtask
  task automatic expect_counts(input int feb, input int e40, input int elong, input int e40s, input string what);
    for (int i = 0; i < NFEB; i++) begin
      checks += 3;
      if (n40[i]   != (i == feb ? e40   : 0)) begin failures++; $display("FAIL %s feb%0d: %0d clk40 pulses", what, i, n40[i]); end
      if (nlong[i] != (i == feb ? elong : 0)) begin failures++; $display("FAIL %s feb%0d: long pulse %0d cycles", what, i, nlong[i]); end
      if (n40_s[i] != (i == feb ? e40s  : 0)) begin failures++; $display("FAIL %s feb%0d: sim clk40 pulses %0d", what, i, n40_s[i]); end
    end
  endtask

  initial begin
    #400000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    reset = 1; long_packet = '0; fiber_err = '0; kill = '0;
    clear_counts();
    #50; reset = 0;
    // long packet on DCFEB 2: one 160 MHz cycle
    @(negedge clk160); long_packet[2] = 1; @(negedge clk160); long_packet[2] = 0;
    repeat (80) @(negedge clk160);
    expect_counts(2, 1, 50, 1, "long packet");
    clear_counts();
    // fiber error on DCFEB 4 rises and stays high for a long time
    @(negedge clk160); fiber_err[4] = 1;
    repeat (120) @(negedge clk160);
    fiber_err[4] = 0;
    repeat (20) @(negedge clk160);
    expect_counts(4, 1, 50, 0, "fiber error");
    clear_counts();
    // killed DCFEB 5: no pulse from either source
    kill[5] = 1;
    @(negedge clk160); long_packet[5] = 1; fiber_err[5] = 1; @(negedge clk160); long_packet[5] = 0;
    repeat (80) @(negedge clk160);
    fiber_err[5] = 0; kill[5] = 0;
    repeat (10) @(negedge clk160);
    expect_counts(-1, 0, 0, 0, "killed");
    clear_counts();
    // DCFEB 0 long packet to check the combinational 160 MHz pulse
    @(negedge clk160); long_packet[0] = 1; #0.1;
    checks++; if (p160 !== 7'b0000001) begin failures++; $display("FAIL pulse160 %b", p160); end
    @(negedge clk160); long_packet[0] = 0;
    repeat (80) @(negedge clk160);
    expect_counts(0, 1, 50, 1, "feb0");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
