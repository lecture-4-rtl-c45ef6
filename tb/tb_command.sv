// tb_command: VME cycles into the decoder. Checks board selection against
// the geographical address, the DEVICE/COMMAND decoding with the cases of a
// recorded ODMB simulation (0x541980 -> device 3, command 0C0, and so on) and
// random addresses, STROBE while the cycle lasts, and that a device's dtack
// pulse is held on the bus (with read data) until the master releases DS.
module tb_command;
  import odmb_pkg::*;
  logic clk = 0, rst;
  logic [23:1] vme_addr;
  logic [4:0] vme_ga;
  logic vme_as_b, vme_write_b, dev_dtack, board_sel, vme_dtack, vme_data_oe;
  logic [1:0] vme_ds_b;
  logic [15:0] vme_data_in, dev_outdata, vme_data_out;
  vme_cmd_t cmd;
  logic [9:0] device;
  int checks = 0, failures = 0;

  command dut (.clk(clk), .rst(rst), .vme_addr(vme_addr), .vme_ga(vme_ga), .vme_as_b(vme_as_b),
    .vme_ds_b(vme_ds_b), .vme_write_b(vme_write_b), .vme_data_in(vme_data_in),
    .dev_dtack(dev_dtack), .dev_outdata(dev_outdata), .cmd(cmd), .device(device),
    .board_sel(board_sel), .vme_dtack(vme_dtack), .vme_data_out(vme_data_out),
    .vme_data_oe(vme_data_oe));
  always #200 clk = ~clk;   // 2.5 MHz SLOWCLK

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // independent decode of the expected fields
  function automatic logic [9:0] exp_device(input logic [23:1] a);
    logic [4:0] code;
    code = {(a[18] | a[17] | a[16]), a[15:12]};
    return (code <= 9) ? (10'b1 << code) : 10'b0;
  endfunction

  task automatic vme_cycle(input logic [23:1] a, input logic wr, input logic [15:0] data,
                           input bit expect_sel);
    int n;
    logic [15:0] rd;
    #($urandom_range(1, 150));
    vme_addr = a; vme_write_b = wr ? 1'b0 : 1'b1; vme_data_in = data;
    #30 vme_as_b = 0;
    #($urandom_range(20, 300)) vme_ds_b = 2'b00;
    n = 0;
    while (!cmd.strobe && n < 8) begin @(posedge clk); #1; n++; end
    if (!expect_sel) begin
      chk(!cmd.strobe, $sformatf("no STROBE for another slot (%h)", a));
      chk(!vme_dtack, "no DTACK for another slot");
    end else begin
      chk(cmd.strobe, $sformatf("STROBE for %h", a));
      chk(device == exp_device(a), $sformatf("%h: DEVICE %h expected %h", a, device, exp_device(a)));
      chk(cmd.command == a[11:2], $sformatf("%h: COMMAND %h", a, cmd.command));
      chk(cmd.writer == !wr, "WRITER");
      if (wr) chk(cmd.indata == data, "write data");
      chk($onehot0(device), "DEVICE one-hot");
      // act as the device: answer after a few cycles
      repeat ($urandom_range(0, 4)) @(posedge clk);
      rd = 16'($urandom);
      @(negedge clk); dev_dtack = 1; dev_outdata = rd;
      @(negedge clk); dev_dtack = 0; dev_outdata = '0;
      repeat (3) begin
        @(negedge clk);
        chk(vme_dtack, "DTACK held until DS is released");
        chk(vme_data_oe == !wr, "data driven on reads only");
        if (!wr) chk(vme_data_out == rd, "read data held");
      end
    end
    vme_ds_b = 2'b11; #20 vme_as_b = 1;
    repeat (4) @(posedge clk); #1;
    chk(!cmd.strobe && !vme_dtack && !vme_data_oe, "cycle ends when DS/AS are released");
  endtask

  initial begin
    #50000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    rst = 1; vme_as_b = 1; vme_ds_b = 2'b11; vme_write_b = 1; vme_addr = '0; vme_data_in = '0;
    dev_dtack = 0; dev_outdata = '0;
    vme_ga = ~5'h15;        // slot 21
    #1000; rst = 0;
    // cases from the recorded simulation of slot 21
    vme_cycle(23'h541980, 1, 16'h0001, 1);
    chk(device == 10'h008 && cmd.command == 10'h0C0, "541980 -> DEVICE 008, COMMAND 0C0");
    vme_cycle(23'h541982, 1, 16'h0001, 1);
    chk(device == 10'h008 && cmd.command == 10'h0C1, "541982 -> DEVICE 008, COMMAND 0C1");
    vme_cycle(23'h542000, 0, 16'h0000, 1);
    chk(device == 10'h010 && cmd.command == 10'h000, "542000 -> DEVICE 010, COMMAND 000");
    vme_cycle(23'h542002, 0, 16'h0000, 1);
    chk(device == 10'h010 && cmd.command == 10'h001, "542002 -> DEVICE 010, COMMAND 001");
    vme_cycle(23'h542180, 1, 16'h0000, 1);
    chk(device == 10'h010 && cmd.command == 10'h0C0, "542180 -> DEVICE 010, COMMAND 0C0");
    // another slot
    vme_cycle(23'h4C1980, 1, 16'h0001, 0);
    // random addresses in this slot and elsewhere
    repeat (60) begin
      logic [23:1] a;
      a = 23'($urandom);
      if ($urandom_range(0, 3) != 0) a[23:19] = 5'h15;
      vme_cycle(a, 1'($urandom), 16'($urandom), a[23:19] == 5'h15);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
