// odmb_ucsb_v2: top of the ODMB (optical DAQ motherboard) FPGA, slow-control
// side and the switches that put the board into its self-test modes.
//
// The board collects data from up to NFEB = 7 DCFEB front-end boards. The
// FPGA holds two big blocks that used to be separate chips: MBV (VME slow
// control, SLOWCLK 2.5 MHz) and MBC (data flow, 40-80 MHz). Built here:
//   * odmb_vme (MBV): VME decoding, device 1 (DCFEB JTAG) and device 3
//     (data/trigger multiplexer settings);
//   * crossclock: the two multiplexer settings moved from SLOWCLK to clk40;
//   * sel_mux: per DCFEB, real data (from the optical receivers) or dummy
//     data; external or internal trigger; per DCFEB, real or dummy TDO;
//   * dcfeb_jtag_dummy: one dummy DCFEB JTAG responder per DCFEB;
//   * dcfeb_pin_buf: the DCFEB_TMS/TDI pins, inputs on ODMB.V2 and outputs
//     on V3/V4, chosen from odmb_id;
//   * bad_dcfeb_pulse: per-DCFEB error pulses (clk40) and 50-cycle FIFO
//     reset pulses (clk160).
// Blocks the design only names (MBC packet building, FIFOs, optical links,
// the other VME devices, dummy LVMB and ALCT/OTMB) are outside; their signals
// are ports. Tri-state pins are split into _in/_out/_oe. reset is an
// asynchronous, active-high clear for every domain; the clocks (slowclk,
// clk40, clk160) come from the board's clocking resources.
module odmb_ucsb_v2 #(
  parameter bit          IS_SIMULATION = 1'b0,
  parameter int unsigned NFEB          = 7
) (
  input  logic                  slowclk,
  input  logic                  clk40,
  input  logic                  clk160,
  input  logic                  reset,
  // VME bus
  input  logic [23:1]           vme_addr,
  input  logic [4:0]            vme_ga,
  input  logic                  vme_as_b,
  input  logic [1:0]            vme_ds_b,
  input  logic                  vme_write_b,
  input  logic [15:0]           vme_data_in,
  output logic [15:0]           vme_data_out,
  output logic                  vme_data_oe,
  output logic                  vme_dtack_b,
  // Board identity
  input  logic [15:0]           odmb_id,
  // DCFEB JTAG
  input  logic [NFEB-1:0]       feb_sel,
  input  logic                  gen_dcfeb_sel,  // 1: TDO from the dummy DCFEBs
  input  logic [NFEB-1:0]       dcfeb_tdo,
  output logic [NFEB-1:0]       dcfeb_tck,
  output logic                  dcfeb_tms_out,
  output logic                  dcfeb_tdi_out,
  output logic                  dcfeb_jtag_oe,
  input  logic                  dcfeb_tms_in,
  input  logic                  dcfeb_tdi_in,
  output logic                  odmb_tms,
  output logic                  odmb_tdi,
  output logic [15:0]           jtag_tdo_data,
  // Data path (clk40)
  input  logic [NFEB-1:0][15:0] dcfeb_data_real,
  input  logic [NFEB-1:0][15:0] dcfeb_data_dummy,
  output logic [NFEB-1:0][15:0] dcfeb_data,
  input  logic                  l1a_ext,
  input  logic                  l1a_int,
  output logic                  l1a,
  output logic                  mux_data_path_40,
  output logic                  mux_trigger_40,
  // Bad-DCFEB handling (clk160 in, clk40/clk160 out)
  input  logic [NFEB-1:0]       bad_dcfeb_longpacket,
  input  logic [NFEB-1:0]       bad_dcfeb_fiber,
  input  logic [NFEB-1:0]       kill,
  output logic [NFEB-1:0]       bad_dcfeb_pulse,
  output logic [NFEB-1:0]       bad_dcfeb_pulse_long
);
  logic            vme_dtack, mux_data_path, mux_trigger;
  logic            jtag_tms, jtag_tdi;
  logic [NFEB-1:0] gen_tdo, int_tdo;

  odmb_vme #(.NFEB(NFEB)) u_mbv (
    .slowclk(slowclk), .rst(reset),
    .vme_addr(vme_addr), .vme_ga(vme_ga), .vme_as_b(vme_as_b), .vme_ds_b(vme_ds_b),
    .vme_write_b(vme_write_b), .vme_data_in(vme_data_in),
    .vme_data_out(vme_data_out), .vme_data_oe(vme_data_oe), .vme_dtack(vme_dtack),
    .feb_sel(feb_sel), .feb_tdo(int_tdo), .feb_tck(dcfeb_tck),
    .feb_tms(jtag_tms), .feb_tdi(jtag_tdi), .jtag_tdo_data(jtag_tdo_data),
    .mux_data_path(mux_data_path), .mux_trigger(mux_trigger)
  );
  assign vme_dtack_b = ~vme_dtack;

  // Settings from the slow domain into the 40 MHz data domain
  crossclock u_cc_data (.clk_din(slowclk), .clk_dout(clk40), .rst(reset),
                        .din(mux_data_path), .dout(mux_data_path_40));
  crossclock u_cc_trig (.clk_din(slowclk), .clk_dout(clk40), .rst(reset),
                        .din(mux_trigger), .dout(mux_trigger_40));

  // Real or dummy sources
  for (genvar i = 0; i < NFEB; i++) begin : g_feb
    sel_mux #(.WIDTH(16)) u_data_mux (.sel(mux_data_path_40), .in0(dcfeb_data_real[i]),
                                      .in1(dcfeb_data_dummy[i]), .out(dcfeb_data[i]));
    sel_mux #(.WIDTH(1)) u_tdo_mux (.sel(gen_dcfeb_sel), .in0(dcfeb_tdo[i]),
                                    .in1(gen_tdo[i]), .out(int_tdo[i]));
    dcfeb_jtag_dummy u_dummy (.clk(slowclk), .rst(reset), .tck(dcfeb_tck[i]),
                              .tms(jtag_tms), .tdi(jtag_tdi), .tdo(gen_tdo[i]),
                              .ir(), .user_reg(), .state());
  end
  sel_mux #(.WIDTH(1)) u_trig_mux (.sel(mux_trigger_40), .in0(l1a_ext), .in1(l1a_int), .out(l1a));

  dcfeb_pin_buf u_pins (
    .odmb_id(odmb_id), .tms_out(jtag_tms), .tdi_out(jtag_tdi),
    .tms_pad_in(dcfeb_tms_in), .tdi_pad_in(dcfeb_tdi_in),
    .tms_pad_out(dcfeb_tms_out), .tdi_pad_out(dcfeb_tdi_out), .pad_oe(dcfeb_jtag_oe),
    .odmb_tms(odmb_tms), .odmb_tdi(odmb_tdi), .is_odmb_v2()
  );

  bad_dcfeb_pulse #(.NFEB(NFEB), .IS_SIMULATION(IS_SIMULATION), .LONG_PULSE(50)) u_bad (
    .clk160(clk160), .clk40(clk40), .reset(reset),
    .long_packet(bad_dcfeb_longpacket), .fiber_err(bad_dcfeb_fiber), .kill(kill),
    .pulse160(), .bad_pulse(bad_dcfeb_pulse), .bad_pulse_long(bad_dcfeb_pulse_long)
  );
endmodule
