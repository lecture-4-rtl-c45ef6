// tb_sel_mux: the selector returns in0 for sel = 0 and in1 for sel = 1.
module tb_sel_mux;
  logic sel;
  logic [15:0] in0, in1, out;
  int checks = 0, failures = 0;
  sel_mux #(.WIDTH(16)) dut (.sel(sel), .in0(in0), .in1(in1), .out(out));
  initial begin
    #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    repeat (200) begin
      sel = 1'($urandom); in0 = 16'($urandom); in1 = 16'($urandom); #1;
      checks++;
      if (out !== (sel ? in1 : in0)) begin failures++; $display("FAIL sel=%b out=%h", sel, out); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
