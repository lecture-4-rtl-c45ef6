// tb_fdce: checks the FDCE flip-flop against its truth table: asynchronous
// clear, hold with CE low, capture on the rising clock edge with CE high.
module tb_fdce;
  logic c = 0, ce, clr, d, q;
  int checks = 0, failures = 0;
  fdce dut (.c(c), .ce(ce), .clr(clr), .d(d), .q(q));
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
    ce = 1; d = 1; clr = 0; #1; clr = 1; #2; chk(0, "clear");
    @(posedge c); #1; chk(0, "clear dominates clock");
    clr = 0; @(posedge c); #1; chk(1, "capture 1");
    d = 0; #2; chk(1, "no change between edges");
    @(posedge c); #1; chk(0, "capture 0");
    d = 1; ce = 0; @(posedge c); #1; chk(0, "hold with ce=0");
    ce = 1; @(posedge c); #1; chk(1, "capture after enable");
    @(negedge c); clr = 1; #1; chk(0, "asynchronous clear mid-cycle"); clr = 0; ce = 0;
    model = 0;
    repeat (200) begin
      @(negedge c); ce = 1'($urandom); d = 1'($urandom);
      @(posedge c); if (ce) model = d; #1; chk(model, "random");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
