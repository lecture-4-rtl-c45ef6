// tb_odmb_vme: VME cycles through the whole MBV block: W/R 3300 and 3304 set
// and read the multiplexer settings, DCFEB JTAG scans (1F0C, 1F1C) reach a
// JTAG device model on the selected DCFEB, cycles to devices that are not
// built and to another slot are not acknowledged.
module tb_odmb_vme;
  localparam int NFEB = 7;
  logic slowclk = 0, rst;
  logic [23:1] vme_addr;
  logic [4:0] vme_ga;
  logic vme_as_b, vme_write_b, vme_data_oe, vme_dtack;
  logic [1:0] vme_ds_b;
  logic [15:0] vme_data_in, vme_data_out, jtag_tdo_data;
  logic [NFEB-1:0] feb_sel, feb_tdo, feb_tck;
  logic feb_tms, feb_tdi, mux_data_path, mux_trigger;
  int checks = 0, failures = 0;

  odmb_vme #(.NFEB(NFEB)) dut (.slowclk(slowclk), .rst(rst), .vme_addr(vme_addr), .vme_ga(vme_ga),
    .vme_as_b(vme_as_b), .vme_ds_b(vme_ds_b), .vme_write_b(vme_write_b), .vme_data_in(vme_data_in),
    .vme_data_out(vme_data_out), .vme_data_oe(vme_data_oe), .vme_dtack(vme_dtack),
    .feb_sel(feb_sel), .feb_tdo(feb_tdo), .feb_tck(feb_tck), .feb_tms(feb_tms), .feb_tdi(feb_tdi),
    .jtag_tdo_data(jtag_tdo_data), .mux_data_path(mux_data_path), .mux_trigger(mux_trigger));
  always #200 slowclk = ~slowclk;

  // JTAG device model on DCFEB 5: TAP table plus a 16-bit register
  int next0 [16] = '{1, 1, 3, 4, 4, 6, 6, 4, 1, 10, 11, 11, 13, 13, 11, 1};
  int next1 [16] = '{0, 2, 9, 5, 5, 8, 7, 8, 2, 0, 12, 12, 15, 14, 15, 2};
  int mstate = 1;
  logic [15:0] mdr = '0, mreg = 16'h1357;
  logic [9:0] mir = '0, mir_upd = '0;
  always @(posedge feb_tck[5]) begin
    case (mstate)
      3: mdr <= mreg;
      4: mdr <= {feb_tdi, mdr[15:1]};
      8: mreg <= mdr;
      10: mir <= 10'b1;
      11: mir <= {feb_tdi, mir[9:1]};
      15: mir_upd <= mir;
      default: ;
    endcase
    mstate <= feb_tms ? next1[mstate] : next0[mstate];
  end
  always @(negedge feb_tck[5]) begin
    if (mstate == 4) feb_tdo[5] <= mdr[0];
    if (mstate == 11) feb_tdo[5] <= mir[0];
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask
  // VME master: slot 21, address = {slot, instruction[18:1]}
  task automatic vme(input logic [15:0] instr, input bit wr, input logic [15:0] wdata,
                     output logic [15:0] rdata, output bit acked);
    int n;
    vme_addr = {5'h15, 3'b000, instr[15:1]};
    vme_write_b = !wr; vme_data_in = wdata;
    #50 vme_as_b = 0;
    #50 vme_ds_b = 2'b00;
    n = 0; acked = 0;
    while (!acked && n < 200) begin @(posedge slowclk); #1; n++; acked = vme_dtack; end
    rdata = vme_data_oe ? vme_data_out : 16'hxxxx;
    #50 vme_ds_b = 2'b11; vme_as_b = 1;
    repeat (4) @(posedge slowclk);
  endtask

  initial begin
    #400000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    logic [15:0] r;
    bit a;
    rst = 1; vme_as_b = 1; vme_ds_b = 2'b11; vme_write_b = 1; vme_addr = '0; vme_data_in = '0;
    vme_ga = ~5'h15; feb_sel = 7'b0100000; feb_tdo = '0;
    #1000; rst = 0;
    vme(16'h3300, 1, 16'h0001, r, a); chk(a && mux_data_path, "W 3300 1");
    vme(16'h3304, 1, 16'h0001, r, a); chk(a && mux_trigger, "W 3304 1");
    vme(16'h3300, 0, 16'h0000, r, a); chk(a && r == 16'h0001, $sformatf("R 3300 = %h", r));
    vme(16'h3300, 1, 16'h0000, r, a); chk(a && !mux_data_path && mux_trigger, "W 3300 0");
    vme(16'h3304, 0, 16'h0000, r, a); chk(a && r == 16'h0001, $sformatf("R 3304 = %h", r));
    vme(16'h3300, 0, 16'h0000, r, a); chk(a && r == 16'h0000, $sformatf("R 3300 = %h", r));
    // JTAG: write 16 bits, read the old value back, then write again
    vme(16'h1F0C, 1, 16'hBEEF, r, a);
    chk(a, "1F0C acknowledged");
    chk(jtag_tdo_data == 16'h1357, $sformatf("old register value read back %h", jtag_tdo_data));
    chk(mreg == 16'hBEEF, $sformatf("register written %h", mreg));
    vme(16'h1F0C, 1, 16'h0000, r, a);
    chk(jtag_tdo_data == 16'hBEEF, $sformatf("second scan reads %h", jtag_tdo_data));
    vme(16'h191C, 1, 16'h0155, r, a);
    chk(a && mir_upd == 10'h155 && mstate == 1, "191C loads the instruction register");
    // not built: device 4; another slot
    vme(16'h4000, 1, 16'h0000, r, a); chk(!a, "device 4 not acknowledged");
    vme_ga = ~5'h07;
    vme(16'h3300, 1, 16'h0001, r, a); chk(!a && !mux_data_path, "other slot ignored");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
