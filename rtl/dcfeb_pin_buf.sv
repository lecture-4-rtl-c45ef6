// dcfeb_pin_buf: the DCFEB_TMS and DCFEB_TDI pins, whose direction depends on
// the board version.
//
// On ODMB.V2 these two pins were wired as inputs to the FPGA; on V3 and V4
// they are outputs to the DCFEBs. Each pin is an IOBUF: T = 1 turns the output
// driver off. T is is_odmb_v2, which is 1 when the top hex digit of the board
// ID (odmb_id[15:12]) is 2. The IOBUF's O output always reads the pin, so on
// V3/V4 it returns the driven value and on V2 the external one. The tri-state
// pad is split into pad_out / pad_oe / pad_in so the block stays two-state;
// the pad cell itself belongs at the chip boundary.
// tms_pad_out and tdi_pad_out are plain copies of tms_out and tdi_out, as
// the IOBUF's I input goes straight to its driver. The version test and the
// driver enable follow the original firmware; the split pad ports are this
// design's choice. All outputs are combinational.
module dcfeb_pin_buf (
  input  logic [15:0] odmb_id,     // board ID register
  input  logic        tms_out,     // TMS from the JTAG engine
  input  logic        tdi_out,     // TDI from the JTAG engine
  input  logic        tms_pad_in,  // what the TMS pin carries from outside
  input  logic        tdi_pad_in,
  output logic        tms_pad_out, // value driven onto the TMS pin
  output logic        tdi_pad_out,
  output logic        pad_oe,      // 1 = FPGA drives both pins (NOT T)
  output logic        odmb_tms,    // IOBUF O: the TMS pin as read back
  output logic        odmb_tdi,
  output logic        is_odmb_v2
);
  always_comb begin
    is_odmb_v2  = (odmb_id[15:12] == 4'h2);
    pad_oe      = ~is_odmb_v2;
    tms_pad_out = tms_out;
    tdi_pad_out = tdi_out;
    odmb_tms    = pad_oe ? tms_out : tms_pad_in;
    odmb_tdi    = pad_oe ? tdi_out : tdi_pad_in;
  end
endmodule
