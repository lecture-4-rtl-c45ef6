// command: VME cycle decoder of the MBV slow-control block.
//
// The VME address lines reaching the FPGA are A23..A1. The decoder
//   * selects the board when A23..A19 equal the inverted geographical
//     address (the GA pins are active low), i.e. the crate slot;
//   * forms COMMAND = A11..A2 and a one-hot 10-bit DEVICE from
//     {A18 OR A17 OR A16, A15..A12}: code n (0..9) sets DEVICE bit n, any
//     other code selects nothing;
//   * passes WRITER = WRITE_B (0 write, 1 read) and the write data;
//   * raises STROBE while the selected cycle is in progress.
// AS and DS (either data strobe) are active low and asynchronous; they pass
// two-flop synchronisers in SLOWCLK. The address and WRITE_B are latched
// when the synchronised AS asserts and the data when DS asserts; STROBE rises
// one cycle later and falls when AS or DS is released. A device answers with
// a one-cycle dtack pulse; the decoder holds the bus DTACK (and, for a read,
// the captured read data) until STROBE falls, as a VME master expects.
// The address fields follow the ODMB firmware; the synchronisers, the
// latching and the DTACK holding are this design's choices.
module command
  import odmb_pkg::*;
(
  input  logic              clk,          // SLOWCLK
  input  logic              rst,
  input  logic [23:1]       vme_addr,
  input  logic [4:0]        vme_ga,       // geographical address, active low
  input  logic              vme_as_b,
  input  logic [1:0]        vme_ds_b,
  input  logic              vme_write_b,
  input  logic [15:0]       vme_data_in,
  input  logic              dev_dtack,    // OR of the devices' dtack pulses
  input  logic [15:0]       dev_outdata,  // OR of the devices' read data
  output vme_cmd_t          cmd,
  output logic [NDEV-1:0]   device,
  output logic              board_sel,
  output logic              vme_dtack,    // active high; the pad inverts it
  output logic [15:0]       vme_data_out,
  output logic              vme_data_oe
);
  logic [1:0]  as_sync, ds_sync;
  logic        as_s, ds_s, as_q, ds_q;
  logic [23:1] adrs_inner;
  logic [4:0]  cga, adrsdev;
  logic        adrshigh;
  logic        writer, strobe, dtack_hold;
  logic [15:0] indata, rdata;

  assign as_s = as_sync[1];
  assign ds_s = ds_sync[1];

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      as_sync      <= '0;
      ds_sync      <= '0;
      as_q         <= 1'b0;
      ds_q         <= 1'b0;
      adrs_inner   <= '0;
      writer       <= 1'b1;
      indata       <= '0;
      strobe       <= 1'b0;
      dtack_hold   <= 1'b0;
      rdata        <= '0;
    end else begin
      as_sync <= {as_sync[0], ~vme_as_b};
      ds_sync <= {ds_sync[0], ~&vme_ds_b};
      as_q    <= as_s;
      ds_q    <= ds_s;
      if (as_s && !as_q) begin
        adrs_inner <= vme_addr;
        writer     <= vme_write_b;
      end
      if (ds_s && !ds_q) indata <= vme_data_in;
      strobe <= as_s && ds_s && as_q && ds_q && board_sel;
      if (!strobe) begin
        dtack_hold <= 1'b0;
      end else if (dev_dtack) begin
        dtack_hold <= 1'b1;
        rdata      <= dev_outdata;
      end
    end
  end

  // Slot and device decoding
  always_comb begin
    cga       = ~vme_ga;
    board_sel = (adrs_inner[23:19] == cga);
    adrshigh  = adrs_inner[18] | adrs_inner[17] | adrs_inner[16];
    adrsdev   = {adrshigh, adrs_inner[15:12]};
    device    = (adrsdev < 5'd10) ? NDEV'(1) << adrsdev : '0;
  end

  assign cmd.strobe  = strobe;
  assign cmd.writer  = writer;
  assign cmd.command = adrs_inner[11:2];
  assign cmd.indata  = indata;

  assign vme_dtack    = dtack_hold;
  assign vme_data_out = rdata;
  assign vme_data_oe  = dtack_hold & writer;

  // DEVICE is one-hot or empty
  assert property (@(posedge clk) disable iff (rst) $onehot0(device));
endmodule
