// odmb_pkg: types and constants shared by the ODMB slow-control (MBV) blocks.
//
// The VME address seen by the FPGA is vme_addr[23:1]; bit 0 never reaches the
// board. Bits 23..19 carry the crate slot, bits 18..12 select one of ten
// devices (one-hot DEVICE) and bits 11..2 form the 10-bit COMMAND. A device
// rebuilds the "human readable" 16-bit instruction {3'b000, dev, COMMAND, 2'b00},
// so that e.g. VME address 0x541980 in slot 21 becomes instruction 0x3300 for
// device 3. These layouts follow the ODMB firmware; the JTAG and handshake
// types below are this design's own encoding.
package odmb_pkg;

  localparam int unsigned NDEV      = 10;  // width of the one-hot DEVICE vector
  localparam int unsigned CMD_W     = 10;  // width of COMMAND
  localparam int unsigned VME_DW    = 16;  // VME data bus width

  // Device numbers of the MBV devices (block diagram of the ODMB_VME block)
  localparam int unsigned DEV_CFEBJTAG    = 1;
  localparam int unsigned DEV_ODMBJTAG    = 2;
  localparam int unsigned DEV_VMEMON      = 3;
  localparam int unsigned DEV_VMECONFREGS = 4;
  localparam int unsigned DEV_TESTFIFOS   = 5;
  localparam int unsigned DEV_BPI_PORT    = 6;
  localparam int unsigned DEV_SYSTEM_MON  = 7;
  localparam int unsigned DEV_LVDBMON     = 8;

  // What the COMMAND decoder hands to every device.
  typedef struct packed {
    logic              strobe;   // high while the VME cycle is being executed
    logic              writer;   // 0 = write, 1 = read (VME WRITE_B is active low)
    logic [CMD_W-1:0]  command;  // address bits 11..2
    logic [VME_DW-1:0] indata;   // data written by the VME master
  } vme_cmd_t;

  // The 16-bit instruction a device compares against.
  function automatic logic [15:0] cmddev(input logic dev, input logic [CMD_W-1:0] command);
    return {3'b000, dev, command, 2'b00};
  endfunction

  // IEEE 1149.1 TAP controller states.
  typedef enum logic [3:0] {
    TAP_RESET      = 4'h0,  // Test-Logic-Reset
    TAP_IDLE       = 4'h1,  // Run-Test/Idle
    TAP_SELECT_DR  = 4'h2,
    TAP_CAPTURE_DR = 4'h3,
    TAP_SHIFT_DR   = 4'h4,
    TAP_EXIT1_DR   = 4'h5,
    TAP_PAUSE_DR   = 4'h6,
    TAP_EXIT2_DR   = 4'h7,
    TAP_UPDATE_DR  = 4'h8,
    TAP_SELECT_IR  = 4'h9,
    TAP_CAPTURE_IR = 4'hA,
    TAP_SHIFT_IR   = 4'hB,
    TAP_EXIT1_IR   = 4'hC,
    TAP_PAUSE_IR   = 4'hD,
    TAP_EXIT2_IR   = 4'hE,
    TAP_UPDATE_IR  = 4'hF
  } tap_state_t;

  // Next TAP state for a given TMS value, as in the standard state diagram.
  function automatic tap_state_t tap_next(input tap_state_t s, input logic tms);
    unique case (s)
      TAP_RESET:      return tms ? TAP_RESET     : TAP_IDLE;
      TAP_IDLE:       return tms ? TAP_SELECT_DR : TAP_IDLE;
      TAP_SELECT_DR:  return tms ? TAP_SELECT_IR : TAP_CAPTURE_DR;
      TAP_CAPTURE_DR: return tms ? TAP_EXIT1_DR  : TAP_SHIFT_DR;
      TAP_SHIFT_DR:   return tms ? TAP_EXIT1_DR  : TAP_SHIFT_DR;
      TAP_EXIT1_DR:   return tms ? TAP_UPDATE_DR : TAP_PAUSE_DR;
      TAP_PAUSE_DR:   return tms ? TAP_EXIT2_DR  : TAP_PAUSE_DR;
      TAP_EXIT2_DR:   return tms ? TAP_UPDATE_DR : TAP_SHIFT_DR;
      TAP_UPDATE_DR:  return tms ? TAP_SELECT_DR : TAP_IDLE;
      TAP_SELECT_IR:  return tms ? TAP_RESET     : TAP_CAPTURE_IR;
      TAP_CAPTURE_IR: return tms ? TAP_EXIT1_IR  : TAP_SHIFT_IR;
      TAP_SHIFT_IR:   return tms ? TAP_EXIT1_IR  : TAP_SHIFT_IR;
      TAP_EXIT1_IR:   return tms ? TAP_UPDATE_IR : TAP_PAUSE_IR;
      TAP_PAUSE_IR:   return tms ? TAP_EXIT2_IR  : TAP_PAUSE_IR;
      TAP_EXIT2_IR:   return tms ? TAP_UPDATE_IR : TAP_SHIFT_IR;
      TAP_UPDATE_IR:  return tms ? TAP_SELECT_DR : TAP_IDLE;
      default:        return TAP_RESET;
    endcase
  endfunction

endpackage
