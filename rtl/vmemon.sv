// vmemon: MBV device 3, the monitor/multiplexer settings of the board.
//
// Instructions (VME instruction = {3'b000, DEVICE, COMMAND, 2'b00}):
//   W 3300 / R 3300  data multiplexer:    0 = real DCFEB data, 1 = dummy data
//   W 3304 / R 3304  trigger multiplexer: 0 = external,        1 = internal
// A write stores bit 0 of the VME data on the rising edge of STROBE AND
// DEVICE; a read returns the setting in bit 0 of outdata (zero otherwise).
// Every cycle addressed to the device is complete at once, so DTACK is a
// one-clk pulse one cycle after STROBE AND DEVICE rises, as in the ODMB
// firmware (which builds it from a flop clocked by that signal and cleared by
// the SLOWCLK flop after it; here the same pulse comes from a synchronous
// edge detector). Both settings reset to 0 (real data, external triggers);
// the reset value is this design's choice.
module vmemon
  import odmb_pkg::*;
(
  input  logic        clk,            // SLOWCLK
  input  logic        rst,
  input  vme_cmd_t    cmd,
  input  logic        device,         // DEVICE bit 3 from the command decoder
  output logic [15:0] outdata,
  output logic        dtack,
  output logic        mux_data_path,  // 1 = dummy DCFEB data
  output logic        mux_trigger     // 1 = internal triggers
);
  logic [15:0] instr;
  logic        w_mux_data_path, r_mux_data_path, w_mux_trigger, r_mux_trigger;
  logic        dd_dtack, dd_dtack_q, start;

  assign instr           = cmddev(device, cmd.command);
  assign w_mux_data_path = (instr == 16'h1300) && !cmd.writer;
  assign r_mux_data_path = (instr == 16'h1300) &&  cmd.writer;
  assign w_mux_trigger   = (instr == 16'h1304) && !cmd.writer;
  assign r_mux_trigger   = (instr == 16'h1304) &&  cmd.writer;

  assign dd_dtack = cmd.strobe & device;
  assign start    = dd_dtack & ~dd_dtack_q;

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      dd_dtack_q    <= 1'b0;
      dtack         <= 1'b0;
      mux_data_path <= 1'b0;
      mux_trigger   <= 1'b0;
    end else begin
      dd_dtack_q <= dd_dtack;
      dtack      <= start;
      if (start && w_mux_data_path) mux_data_path <= cmd.indata[0];
      if (start && w_mux_trigger)   mux_trigger   <= cmd.indata[0];
    end
  end

  always_comb begin
    outdata = '0;
    if (dd_dtack && r_mux_data_path) outdata = {15'd0, mux_data_path};
    if (dd_dtack && r_mux_trigger)   outdata = {15'd0, mux_trigger};
  end
endmodule
