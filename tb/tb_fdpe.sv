// tb_fdpe: checks the FDPE flip-flop against its truth table: asynchronous
// preset, hold with CE low, capture on the rising clock edge with CE high.
module tb_fdpe;
  logic c = 0, ce, pre, d, q;
  int checks = 0, failures = 0;
  fdpe dut (.c(c), .ce(ce), .pre(pre), .d(d), .q(q));
  always #5 c = ~c;
  task automatic chk(input logic exp, input string what);
    checks++;
    if (q !== exp) begin failures++; $display("FAIL %s: q=%b exp=%b", what, q, exp); end
  endtask
  initial begin
    #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    logic model;
    ce = 1; d = 0; pre = 0; #1; pre = 1; #2; chk(1, "preset");
    @(posedge c); #1; chk(1, "preset dominates clock");
    pre = 0; @(posedge c); #1; chk(0, "capture 0");
    d = 1; @(posedge c); #1; chk(1, "capture 1");
    d = 0; ce = 0; @(posedge c); #1; chk(1, "hold with ce=0");
    ce = 1; @(posedge c); #1; chk(0, "capture after enable");
    @(negedge c); pre = 1; #1; chk(1, "asynchronous preset mid-cycle"); pre = 0; ce = 0;
    model = 1;
    repeat (200) begin
      @(negedge c); ce = 1'($urandom); d = 1'($urandom);
      @(posedge c); if (ce) model = d; #1; chk(model, "random");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
