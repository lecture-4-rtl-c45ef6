// cfebjtag: MBV device 1, the JTAG master towards the DCFEBs.
//
// A VME write of instruction 1Y00/1Y04/1Y08/1Y0C/1Y1C (Y = one hex digit)
// shifts the low Y+1 bits of the VME data word, LSB first, into the selected
// DCFEBs' JTAG chain:
//   1Y00  data only, TMS held at 0 (the TAP stays in Shift-DR)
//   1Y04  TMS header first: 1,0,0 takes the TAP from Run-Test/Idle to Shift-DR
//   1Y08  TMS tailer after: TMS = 1 on the last bit (Exit1-DR), then 1
//         (Update-DR) and 0 (back to Run-Test/Idle)
//   1Y0C  header and tailer
//   1Y1C  instruction register: header 1,1,0,0 to Shift-IR, data, tailer
// Splitting a long scan into a header-only write, any number of data-only
// writes and a tailer-only write gives data scans of any length.
//
// Timing: one TCK period is two clk cycles. TMS/TDI change with TCK low and
// are stable across the rising edge; TDO is sampled one clk cycle after the
// rising edge. The scan starts on the rising edge of STROBE AND DEVICE for a
// valid write; when the last TCK cycle is over the block raises DTACK for one
// clk cycle, then waits for STROBE to drop. A 1Y0C scan thus takes
// 2 * (Y + 1 + 5) clk cycles plus two. Bits read back on TDO are kept in
// tdo_data (bit i = TDO during data bit i). TCK goes only to the DCFEBs set in
// feb_sel, and TDO is the OR of their TDOs (select one DCFEB to read back).
// The data-scan codes 1Y00-1Y0C are those of the original firmware; 1Y1C is
// added from the board's wider instruction set. The meaning of Y as
// Y+1 bits, the two-cycle TCK, the header/tailer lengths (the shortest paths
// of the TAP state diagram) and feb_sel are this design's choices.
module cfebjtag
  import odmb_pkg::*;
#(
  parameter int unsigned NFEB = 7
) (
  input  logic            clk,
  input  logic            rst,
  input  vme_cmd_t        cmd,
  input  logic            device,     // DEVICE bit 1 from the command decoder
  input  logic [NFEB-1:0] feb_sel,    // DCFEBs taking part in the scan
  input  logic [NFEB-1:0] feb_tdo,    // TDO of each DCFEB (real or dummy)
  output logic [NFEB-1:0] feb_tck,
  output logic            tms,
  output logic            tdi,
  output logic [15:0]     tdo_data,
  output logic            busy,
  output logic            dtack
);
  typedef enum logic [1:0] {J_IDLE, J_SHIFT, J_ACK, J_WAIT} jstate_t;

  jstate_t     st;
  logic [15:0] instr;
  logic        valid, go, strobe_dev, strobe_dev_q;
  logic        phase, tck_r;
  logic [4:0]  step, hdr_len, nbits, total;
  logic        tail, is_ir;
  logic [15:0] data;
  logic [4:0]  d_idx, prev_idx;
  logic        step_tms, step_tdi, step_is_data, prev_is_data;
  logic        tdo_in;

  // Instruction decode
  assign instr      = cmddev(device, cmd.command);
  assign valid      = (instr[15:12] == 4'h1) && !cmd.writer &&
                      (instr[7:0] inside {8'h00, 8'h04, 8'h08, 8'h0C, 8'h1C});
  assign strobe_dev = cmd.strobe & device;
  assign go         = strobe_dev & ~strobe_dev_q & valid;

  // What TMS/TDI carry during the current step
  always_comb begin
    total        = hdr_len + nbits + (tail ? 5'd2 : 5'd0);
    d_idx        = step - hdr_len;
    step_is_data = (step >= hdr_len) && (d_idx < nbits);
    step_tdi     = 1'b0;
    if (step < hdr_len)     step_tms = (step == 5'd0) || (is_ir && step == 5'd1);
    else if (step_is_data) begin
      step_tms = tail && (d_idx == nbits - 5'd1);
      step_tdi = data[d_idx[3:0]];
    end
    else                    step_tms = (step == hdr_len + nbits);  // Update, then Idle
  end

  assign tdo_in  = |(feb_tdo & feb_sel);
  assign feb_tck = {NFEB{tck_r}} & feb_sel;
  assign busy    = (st != J_IDLE);

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      st           <= J_IDLE;
      strobe_dev_q <= 1'b0;
      phase        <= 1'b0;
      tck_r        <= 1'b0;
      tms          <= 1'b0;
      tdi          <= 1'b0;
      step         <= '0;
      hdr_len      <= '0;
      nbits        <= '0;
      tail         <= 1'b0;
      is_ir        <= 1'b0;
      data         <= '0;
      tdo_data     <= '0;
      prev_is_data <= 1'b0;
      prev_idx     <= '0;
      dtack        <= 1'b0;
    end else begin
      strobe_dev_q <= strobe_dev;
      dtack        <= 1'b0;
      unique case (st)
        J_IDLE: begin
          tck_r <= 1'b0;
          if (go) begin
            is_ir        <= (instr[7:0] == 8'h1C);
            hdr_len      <= instr[2]     ? ((instr[4]) ? 5'd4 : 5'd3) : 5'd0;
            tail         <= instr[3];
            nbits        <= {1'b0, instr[11:8]} + 5'd1;
            data         <= cmd.indata;
            tdo_data     <= '0;
            step         <= '0;
            phase        <= 1'b0;
            prev_is_data <= 1'b0;
            st           <= J_SHIFT;
          end
        end
        J_SHIFT: begin
          if (!phase) begin
            // TCK falls; sample TDO of the step that just ended
            tck_r <= 1'b0;
            if (prev_is_data) tdo_data[prev_idx[3:0]] <= tdo_in;
            if (step == total) begin
              st <= J_ACK;
            end else begin
              tms   <= step_tms;
              tdi   <= step_tdi;
              phase <= 1'b1;
            end
          end else begin
            // TCK rises with TMS/TDI stable
            tck_r        <= 1'b1;
            prev_is_data <= step_is_data;
            prev_idx     <= d_idx;
            step         <= step + 5'd1;
            phase        <= 1'b0;
          end
        end
        J_ACK: begin
          tms   <= 1'b0;
          tdi   <= 1'b0;
          dtack <= 1'b1;
          st    <= J_WAIT;
        end
        J_WAIT: if (!strobe_dev) st <= J_IDLE;
        default: st <= J_IDLE;
      endcase
    end
  end

  // DTACK is a single-cycle pulse, and TMS/TDI never change while TCK is high
  assert property (@(posedge clk) disable iff (rst) dtack |=> !dtack);
  assert property (@(posedge clk) disable iff (rst) ($changed(tms) || $changed(tdi)) |-> !tck_r);
endmodule
