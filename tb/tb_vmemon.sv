// tb_vmemon: device 3 instructions W/R 3300 (data multiplexer) and W/R 3304
// (trigger multiplexer): writes change only their own setting, reads return
// it in bit 0, DTACK is one clk wide and comes on the first edge that sees
// STROBE AND DEVICE, and nothing happens without the device bit.
module tb_vmemon;
  import odmb_pkg::*;
  logic clk = 0, rst, device, dtack, mux_data_path, mux_trigger;
  vme_cmd_t cmd;
  logic [15:0] outdata;
  int checks = 0, failures = 0;
  vmemon dut (.clk(clk), .rst(rst), .cmd(cmd), .device(device), .outdata(outdata),
              .dtack(dtack), .mux_data_path(mux_data_path), .mux_trigger(mux_trigger));
  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask
  // one cycle; returns the read data seen while strobe is high
  task automatic cycle(input logic dev, input logic [15:0] instr, input logic rd,
                       input logic [15:0] data, output logic [15:0] rdata);
    @(negedge clk);
    device = dev; cmd.command = instr[11:2]; cmd.writer = rd; cmd.indata = data; cmd.strobe = 1;
    #1; rdata = outdata;
    chk(!dtack, "no DTACK before the edge");
    @(posedge clk); #1;
    chk(dtack == dev, $sformatf("DTACK on first edge for %h (dev=%b)", instr, dev));
    @(posedge clk); #1;
    chk(!dtack, "DTACK one cycle wide");
    repeat (2) @(posedge clk); #1;
    chk(!dtack, "single DTACK per strobe");
    @(negedge clk); cmd.strobe = 0; device = 0;
    @(negedge clk);
  endtask

  initial begin
    #500000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    logic [15:0] r;
    logic exp_d, exp_t;
    rst = 1; cmd = '0; cmd.writer = 1; device = 0; #22; rst = 0;
    chk(!mux_data_path && !mux_trigger, "reset: real data, external triggers");
    exp_d = 0; exp_t = 0;
    repeat (40) begin
      logic v;
      int op;
      v = 1'($urandom);
      op = $urandom_range(0, 5);
      case (op)
        0: begin cycle(1, 16'h1300, 0, {15'h7abc, v}, r); exp_d = v; end
        1: begin cycle(1, 16'h1304, 0, {15'h1234, v}, r); exp_t = v; end
        2: begin cycle(1, 16'h1300, 1, 16'hFFFF, r); chk(r == {15'd0, exp_d}, $sformatf("R 3300 = %h", r)); end
        3: begin cycle(1, 16'h1304, 1, 16'hFFFF, r); chk(r == {15'd0, exp_t}, $sformatf("R 3304 = %h", r)); end
        4: begin cycle(0, 16'h1300, 0, {15'd0, ~exp_d}, r); chk(r == 0, "no read data without device"); end
        default: begin cycle(1, 16'h1308, 0, 16'hFFFF, r); chk(r == 0, "unknown instruction reads 0"); end
      endcase
      chk(mux_data_path == exp_d, "data multiplexer setting");
      chk(mux_trigger == exp_t, "trigger multiplexer setting");
    end
    // make sure both settings were seen at 1 and 0
    cycle(1, 16'h1300, 0, 16'h0001, r); chk(mux_data_path, "W 3300 1 -> dummy data");
    cycle(1, 16'h1304, 0, 16'h0001, r); chk(mux_trigger, "W 3304 1 -> internal triggers");
    cycle(1, 16'h1300, 0, 16'h0000, r); chk(!mux_data_path && mux_trigger, "W 3300 0 leaves trigger");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
