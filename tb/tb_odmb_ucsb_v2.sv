// tb_odmb_ucsb_v2: end-to-end test of the ODMB top at its default size
// (7 DCFEBs). A VME master in slot 21 switches the board between real and
// dummy data (W 3300) and external and internal triggers (W 3304), reads the
// settings back, and runs DCFEB JTAG scans both on the on-chip dummy DCFEBs
// and on a model of a real DCFEB, including a long scan split into
// header-only, data-only and tailer-only writes and an instruction-register
// scan. It also checks the settings arriving in the 40 MHz domain, the data
// and trigger multiplexers, the DCFEB_TMS/TDI pin direction for ODMB.V2 and
// later boards, and the bad-DCFEB pulses. Every mechanism is counted and must
// happen at least once.
module tb_odmb_ucsb_v2;
  localparam int NFEB = 7;
  logic slowclk = 0, clk40 = 0, clk160 = 0, reset;
  logic [23:1] vme_addr;
  logic [4:0] vme_ga;
  logic vme_as_b, vme_write_b, vme_data_oe, vme_dtack_b;
  logic [1:0] vme_ds_b;
  logic [15:0] vme_data_in, vme_data_out, odmb_id, jtag_tdo_data;
  logic [NFEB-1:0] feb_sel, dcfeb_tdo, dcfeb_tck, kill, longpacket, fiber, bad_pulse, bad_pulse_long;
  logic gen_dcfeb_sel, dcfeb_tms_out, dcfeb_tdi_out, dcfeb_jtag_oe, dcfeb_tms_in, dcfeb_tdi_in;
  logic odmb_tms, odmb_tdi, l1a_ext, l1a_int, l1a, mux_data_path_40, mux_trigger_40;
  logic [NFEB-1:0][15:0] data_real, data_dummy, data_out;
  int checks = 0, failures = 0;

  odmb_ucsb_v2 dut (
    .slowclk(slowclk), .clk40(clk40), .clk160(clk160), .reset(reset),
    .vme_addr(vme_addr), .vme_ga(vme_ga), .vme_as_b(vme_as_b), .vme_ds_b(vme_ds_b),
    .vme_write_b(vme_write_b), .vme_data_in(vme_data_in), .vme_data_out(vme_data_out),
    .vme_data_oe(vme_data_oe), .vme_dtack_b(vme_dtack_b), .odmb_id(odmb_id),
    .feb_sel(feb_sel), .gen_dcfeb_sel(gen_dcfeb_sel), .dcfeb_tdo(dcfeb_tdo), .dcfeb_tck(dcfeb_tck),
    .dcfeb_tms_out(dcfeb_tms_out), .dcfeb_tdi_out(dcfeb_tdi_out), .dcfeb_jtag_oe(dcfeb_jtag_oe),
    .dcfeb_tms_in(dcfeb_tms_in), .dcfeb_tdi_in(dcfeb_tdi_in), .odmb_tms(odmb_tms), .odmb_tdi(odmb_tdi),
    .jtag_tdo_data(jtag_tdo_data), .dcfeb_data_real(data_real), .dcfeb_data_dummy(data_dummy),
    .dcfeb_data(data_out), .l1a_ext(l1a_ext), .l1a_int(l1a_int), .l1a(l1a),
    .mux_data_path_40(mux_data_path_40), .mux_trigger_40(mux_trigger_40),
    .bad_dcfeb_longpacket(longpacket), .bad_dcfeb_fiber(fiber), .kill(kill),
    .bad_dcfeb_pulse(bad_pulse), .bad_dcfeb_pulse_long(bad_pulse_long));

  always #200 slowclk = ~slowclk;              // 2.5 MHz
  initial begin #3; forever #12.5 clk40 = ~clk40; end
  initial begin #1; forever #3.125 clk160 = ~clk160; end

  // mechanism counters
  int n_board_reject, n_undecoded, n_vmemon_w, n_vmemon_r, n_cross, n_data_mux, n_trig_mux;
  int n_scan_full, n_scan_hdr, n_scan_data, n_scan_tail, n_scan_ir, n_tdo_dummy, n_tdo_real;
  int n_v2_pins, n_v4_pins, n_bad_long, n_bad_fiber, n_bad_killed;

  // model of a real DCFEB on position 2 (TAP table plus 16-bit register)
  int next0 [16] = '{1, 1, 3, 4, 4, 6, 6, 4, 1, 10, 11, 11, 13, 13, 11, 1};
  int next1 [16] = '{0, 2, 9, 5, 5, 8, 7, 8, 2, 0, 12, 12, 15, 14, 15, 2};
  int mstate;
  logic [15:0] mdr, mreg;
  always @(posedge dcfeb_tck[2]) begin
    case (mstate)
      3: mdr <= mreg;
      4: mdr <= {dcfeb_tdi_out, mdr[15:1]};
      8: mreg <= mdr;
      default: ;
    endcase
    mstate <= dcfeb_tms_out ? next1[mstate] : next0[mstate];
  end
  always @(negedge dcfeb_tck[2]) if (mstate == 4) dcfeb_tdo[2] <= mdr[0];

  // bad-DCFEB pulse counters
  int cnt40 [NFEB], cntlong [NFEB];
  always @(posedge clk40) if (!reset) for (int i = 0; i < NFEB; i++) if (bad_pulse[i]) cnt40[i]++;
  always @(posedge clk160) if (!reset) for (int i = 0; i < NFEB; i++) if (bad_pulse_long[i]) cntlong[i]++;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask
  task automatic vme(input logic [15:0] instr, input bit wr, input logic [15:0] wdata,
                     output logic [15:0] rdata, output bit acked);
    int n;
    vme_addr = {5'h15, 3'b000, instr[15:1]};
    vme_write_b = !wr; vme_data_in = wdata;
    #50 vme_as_b = 0;
    #50 vme_ds_b = 2'b00;
    n = 0; acked = 0;
    while (!acked && n < 200) begin @(posedge slowclk); #1; n++; acked = !vme_dtack_b; end
    rdata = vme_data_oe ? vme_data_out : 16'h0000;
    #50 vme_ds_b = 2'b11; vme_as_b = 1;
    repeat (4) @(posedge slowclk);
  endtask
  task automatic wait40(input int n);
    repeat (n) @(posedge clk40);
    #1;
  endtask
  task automatic clear_bad();
    for (int i = 0; i < NFEB; i++) begin cnt40[i] = 0; cntlong[i] = 0; end
  endtask

  initial begin
    #900000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    logic [15:0] r;
    bit a;
    {n_board_reject, n_undecoded, n_vmemon_w, n_vmemon_r, n_cross, n_data_mux, n_trig_mux} = '0;
    {n_scan_full, n_scan_hdr, n_scan_data, n_scan_tail, n_scan_ir, n_tdo_dummy, n_tdo_real} = '0;
    {n_v2_pins, n_v4_pins, n_bad_long, n_bad_fiber, n_bad_killed} = '0;
    mstate = 1; mdr = '0; mreg = 16'h2468;
    reset = 1; vme_as_b = 1; vme_ds_b = 2'b11; vme_write_b = 1; vme_addr = '0; vme_data_in = '0;
    vme_ga = ~5'h15; odmb_id = 16'h4A01; feb_sel = '0; gen_dcfeb_sel = 0; dcfeb_tdo = '0;
    dcfeb_tms_in = 0; dcfeb_tdi_in = 0; l1a_ext = 0; l1a_int = 0;
    kill = '0; longpacket = '0; fiber = '0;
    for (int i = 0; i < NFEB; i++) begin
      data_real[i] = 16'h1000 + 16'(i); data_dummy[i] = 16'hD000 + 16'(i); cnt40[i] = 0; cntlong[i] = 0;
    end
    #2000; reset = 0;

    // ---- data and trigger multiplexers through VMEMON ----
    wait40(2);
    chk(!mux_data_path_40 && data_out[3] == 16'h1003, "reset: real data");
    l1a_ext = 1; #1; chk(l1a, "reset: external trigger"); l1a_ext = 0;
    vme(16'h3300, 1, 16'h0001, r, a); n_vmemon_w++;
    chk(a, "W 3300 acknowledged");
    wait40(3); n_cross++;
    chk(mux_data_path_40, "data multiplexer setting reaches clk40");
    for (int i = 0; i < NFEB; i++) chk(data_out[i] == 16'hD000 + 16'(i), $sformatf("dummy data on DCFEB %0d", i));
    n_data_mux++;
    vme(16'h3304, 1, 16'h0001, r, a); n_vmemon_w++;
    wait40(3); n_cross++;
    l1a_int = 1; l1a_ext = 0; #1; chk(l1a && mux_trigger_40, "internal trigger selected"); n_trig_mux++;
    l1a_int = 0;
    vme(16'h3300, 0, 16'h0000, r, a); n_vmemon_r++; chk(a && r == 16'h0001, "R 3300 = 1");
    vme(16'h3304, 0, 16'h0000, r, a); n_vmemon_r++; chk(a && r == 16'h0001, "R 3304 = 1");
    vme(16'h3300, 1, 16'h0000, r, a); n_vmemon_w++;
    wait40(3);
    chk(!mux_data_path_40 && data_out[6] == 16'h1006, "back to real data"); n_data_mux++;
    vme(16'h3304, 1, 16'h0000, r, a); n_vmemon_w++;
    wait40(3);
    l1a_ext = 1; #1; chk(l1a && !mux_trigger_40, "back to external triggers"); l1a_ext = 0; n_trig_mux++;

    // ---- slot and device selection ----
    vme_ga = ~5'h03;
    vme(16'h3300, 1, 16'h0001, r, a); chk(!a, "another slot is not acknowledged"); n_board_reject++;
    vme_ga = ~5'h15;
    wait40(3); chk(!mux_data_path_40, "setting unchanged by another slot's cycle");
    vme(16'h7000, 1, 16'h0000, r, a); chk(!a, "device 7 is not built, no DTACK"); n_undecoded++;

    // ---- JTAG on a dummy DCFEB ----
    gen_dcfeb_sel = 1; feb_sel = 7'b0010000;  // DCFEB 4, dummy
    // the dummy TAP leaves reset in Test-Logic-Reset: one data-only bit
    // (TMS = 0) takes it to Run-Test/Idle
    vme(16'h1000, 1, 16'h0000, r, a); n_scan_data++;
    chk(a, "W 1000 acknowledged");
    vme(16'h1F0C, 1, 16'hCAFE, r, a); n_scan_full++; n_tdo_dummy++;
    chk(a && jtag_tdo_data == 16'h0000, "dummy register starts at 0");
    vme(16'h1F0C, 1, 16'h1234, r, a); n_scan_full++; n_tdo_dummy++;
    chk(a && jtag_tdo_data == 16'hCAFE, $sformatf("dummy reads back CAFE: %h", jtag_tdo_data));
    // long scan in three writes: 4 + 4 + 8 bits
    vme(16'h1304, 1, 16'h0005, r, a); n_scan_hdr++;
    chk(a && jtag_tdo_data[3:0] == 4'h4, "header-only write reads first 4 bits");
    vme(16'h1300, 1, 16'h000A, r, a); n_scan_data++;
    chk(a && jtag_tdo_data[3:0] == 4'h3, "data-only write reads next 4 bits");
    vme(16'h1708, 1, 16'h00F1, r, a); n_scan_tail++;
    chk(a && jtag_tdo_data[7:0] == 8'h12, "tailer-only write reads last 8 bits");
    vme(16'h1F0C, 1, 16'h0000, r, a); n_scan_full++;
    chk(jtag_tdo_data == 16'hF1A5, $sformatf("three-part scan stored F1A5: %h", jtag_tdo_data));
    // instruction register scan, reading the capture pattern
    vme(16'h191C, 1, 16'h0000, r, a); n_scan_ir++;
    chk(a && jtag_tdo_data == 16'h0001, $sformatf("IR capture pattern %h", jtag_tdo_data));

    // ---- JTAG on a real DCFEB (model), V4 board drives the pins ----
    chk(dcfeb_jtag_oe, "ODMB V4 drives DCFEB_TMS/TDI"); n_v4_pins++;
    gen_dcfeb_sel = 0; feb_sel = 7'b0000100;  // DCFEB 2, real
    vme(16'h1F0C, 1, 16'h55AA, r, a); n_scan_full++; n_tdo_real++;
    chk(a && jtag_tdo_data == 16'h2468, $sformatf("real DCFEB old value %h", jtag_tdo_data));
    chk(mreg == 16'h55AA && mstate == 1, "real DCFEB register written, TAP idle");
    chk(odmb_tms == dcfeb_tms_out, "V4: IOBUF reads back the driven TMS");

    // ---- ODMB.V2: pins are inputs ----
    odmb_id = 16'h2B07; dcfeb_tms_in = 1; dcfeb_tdi_in = 0; #1;
    chk(!dcfeb_jtag_oe && odmb_tms && !odmb_tdi, "V2: pins are inputs and read from outside"); n_v2_pins++;
    odmb_id = 16'h4A01;

    // ---- bad-DCFEB pulses ----
    clear_bad();
    @(negedge clk160); longpacket[1] = 1; @(negedge clk160); longpacket[1] = 0;
    repeat (100) @(negedge clk160);
    chk(cnt40[1] == 1 && cntlong[1] == 50, $sformatf("long packet: %0d clk40 pulse, %0d-cycle reset", cnt40[1], cntlong[1]));
    n_bad_long++;
    clear_bad();
    @(negedge clk160); fiber[6] = 1; repeat (100) @(negedge clk160); fiber[6] = 0;
    repeat (10) @(negedge clk160);
    chk(cnt40[6] == 1 && cntlong[6] == 50, "fiber error: one pulse and a 50-cycle reset"); n_bad_fiber++;
    clear_bad();
    kill[0] = 1;
    @(negedge clk160); longpacket[0] = 1; @(negedge clk160); longpacket[0] = 0;
    repeat (100) @(negedge clk160);
    chk(cnt40[0] == 0 && cntlong[0] == 0, "killed DCFEB raises nothing"); n_bad_killed++;

    // every mechanism happened
    chk(n_board_reject > 0, "mechanism: board select reject");
    chk(n_undecoded > 0, "mechanism: unbuilt device");
    chk(n_vmemon_w > 0 && n_vmemon_r > 0, "mechanism: VMEMON write/read");
    chk(n_cross > 0, "mechanism: clock crossing");
    chk(n_data_mux > 0 && n_trig_mux > 0, "mechanism: data/trigger multiplexers");
    chk(n_scan_full > 0 && n_scan_hdr > 0 && n_scan_data > 0 && n_scan_tail > 0 && n_scan_ir > 0,
        "mechanism: all JTAG instruction kinds");
    chk(n_tdo_dummy > 0 && n_tdo_real > 0, "mechanism: TDO multiplexer both ways");
    chk(n_v2_pins > 0 && n_v4_pins > 0, "mechanism: both pin directions");
    chk(n_bad_long > 0 && n_bad_fiber > 0 && n_bad_killed > 0, "mechanism: bad-DCFEB pulses");
    $display("mechanisms: reject=%0d undecoded=%0d vmemon_w=%0d vmemon_r=%0d cross=%0d data_mux=%0d trig_mux=%0d",
             n_board_reject, n_undecoded, n_vmemon_w, n_vmemon_r, n_cross, n_data_mux, n_trig_mux);
    $display("mechanisms: scan full=%0d hdr=%0d data=%0d tail=%0d ir=%0d tdo dummy=%0d real=%0d v2=%0d v4=%0d bad long=%0d fiber=%0d killed=%0d",
             n_scan_full, n_scan_hdr, n_scan_data, n_scan_tail, n_scan_ir, n_tdo_dummy, n_tdo_real,
             n_v2_pins, n_v4_pins, n_bad_long, n_bad_fiber, n_bad_killed);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
