// odmb_vme: the MBV slow-control block. VME cycles from the crate controller
// are decoded by `command` into COMMAND, a one-hot DEVICE and STROBE, and
// handed to the devices on a shared bus. Two devices are built here:
//   device 1  cfebjtag  JTAG scans towards the DCFEBs (W 1Y00..1Y1C)
//   device 3  vmemon    data and trigger multiplexer settings (W/R 3300, 3304)
// The devices' dtack pulses and read data are ORed back into `command`, which
// drives the bus DTACK and data. Cycles to devices that are not built (2, 4
// to 8) are never acknowledged. Everything runs on SLOWCLK (2.5 MHz in the
// ODMB).
module odmb_vme
  import odmb_pkg::*;
#(
  parameter int unsigned NFEB = 7
) (
  input  logic            slowclk,
  input  logic            rst,
  input  logic [23:1]     vme_addr,
  input  logic [4:0]      vme_ga,
  input  logic            vme_as_b,
  input  logic [1:0]      vme_ds_b,
  input  logic            vme_write_b,
  input  logic [15:0]     vme_data_in,
  output logic [15:0]     vme_data_out,
  output logic            vme_data_oe,
  output logic            vme_dtack,
  // DCFEB JTAG
  input  logic [NFEB-1:0] feb_sel,
  input  logic [NFEB-1:0] feb_tdo,
  output logic [NFEB-1:0] feb_tck,
  output logic            feb_tms,
  output logic            feb_tdi,
  output logic [15:0]     jtag_tdo_data,
  // VMEMON settings
  output logic            mux_data_path,
  output logic            mux_trigger
);
  vme_cmd_t        cmd;
  logic [NDEV-1:0] device;
  logic            dtack_jtag, dtack_mon;
  logic [15:0]     outdata_mon;

  command u_command (
    .clk(slowclk), .rst(rst),
    .vme_addr(vme_addr), .vme_ga(vme_ga), .vme_as_b(vme_as_b), .vme_ds_b(vme_ds_b),
    .vme_write_b(vme_write_b), .vme_data_in(vme_data_in),
    .dev_dtack(dtack_jtag | dtack_mon), .dev_outdata(outdata_mon),
    .cmd(cmd), .device(device), .board_sel(),
    .vme_dtack(vme_dtack), .vme_data_out(vme_data_out), .vme_data_oe(vme_data_oe)
  );

  cfebjtag #(.NFEB(NFEB)) u_cfebjtag (
    .clk(slowclk), .rst(rst), .cmd(cmd), .device(device[DEV_CFEBJTAG]),
    .feb_sel(feb_sel), .feb_tdo(feb_tdo), .feb_tck(feb_tck),
    .tms(feb_tms), .tdi(feb_tdi), .tdo_data(jtag_tdo_data),
    .busy(), .dtack(dtack_jtag)
  );

  vmemon u_vmemon (
    .clk(slowclk), .rst(rst), .cmd(cmd), .device(device[DEV_VMEMON]),
    .outdata(outdata_mon), .dtack(dtack_mon),
    .mux_data_path(mux_data_path), .mux_trigger(mux_trigger)
  );

  // Only one device answers a cycle
  assert property (@(posedge slowclk) disable iff (rst) !(dtack_jtag && dtack_mon));
endmodule
