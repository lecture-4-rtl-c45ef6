// tb_jtag_tap: random TMS streams are compared with an independent table of
// the TAP state diagram; five TMS = 1 cycles reach Test-Logic-Reset from any
// state; the state only moves on tck_rise.
module tb_jtag_tap;
  import odmb_pkg::*;
  logic clk = 0, rst, tck_rise, tms;
  tap_state_t state;
  int checks = 0, failures = 0;
  jtag_tap dut (.clk(clk), .rst(rst), .tck_rise(tck_rise), .tms(tms), .state(state));
  always #5 clk = ~clk;

  // Table written from the state diagram: next state for TMS = 0 and TMS = 1,
  // indexed by state code (see tap_state_t).
  int next0 [16] = '{1, 1, 3, 4, 4, 6, 6, 4, 1, 10, 11, 11, 13, 13, 11, 1};
  int next1 [16] = '{0, 2, 9, 5, 5, 8, 7, 8, 2, 0, 12, 12, 15, 14, 15, 2};

  initial begin
    #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    int model;
    rst = 1; tck_rise = 0; tms = 0; #12; rst = 0;
    checks++; if (state !== TAP_RESET) begin failures++; $display("FAIL reset state"); end
    model = 0;
    repeat (3000) begin
      @(negedge clk);
      tck_rise = ($urandom_range(0, 3) != 0);
      tms = ($urandom_range(0, 2) == 0);
      @(posedge clk); #1;
      if (tck_rise) model = tms ? next1[model] : next0[model];
      checks++;
      if (int'(state) != model) begin failures++; $display("FAIL state %0d expected %0d", state, model); end
    end
    // five TMS = 1 edges from every state end in Test-Logic-Reset
    for (int s = 0; s < 16; s++) begin
      // walk to state s with the model, searching a random path
      int guard = 0;
      while (int'(state) != s && guard < 200) begin
        @(negedge clk); tck_rise = 1; tms = 1'($urandom); @(posedge clk); #1; guard++;
      end
      @(negedge clk); tms = 1; tck_rise = 1;
      repeat (5) @(posedge clk);
      #1; checks++;
      if (state !== TAP_RESET) begin failures++; $display("FAIL from %0d: 5x TMS=1 gives %0d", s, state); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
