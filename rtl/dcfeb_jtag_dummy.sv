// dcfeb_jtag_dummy: the JTAG side of an on-chip dummy DCFEB, so that the
// ODMB's DCFEB JTAG engine can be exercised without a real DCFEB attached.
//
// It oversamples TCK with the system clock: a TCK rising edge advances the
// TAP controller and shifts TDI into the instruction or data shift register;
// a TCK falling edge presents the next bit on TDO (LSB first), as a JTAG
// device does. The instruction register (IR_LEN bits) captures the pattern
// ...01 and is loaded at Update-IR. An instruction of all ones selects the
// one-bit bypass register; any other selects a DR_LEN-bit user register that
// captures its own content at Capture-DR and loads the shifted value at
// Update-DR, so a value written in one scan is read back in the next.
// Test-Logic-Reset clears the instruction (user register selected).
// TCK must be synchronous to clk and stay at least one clk cycle in each
// level. The register layout is this design's choice: the document only
// names the dummy DCFEBs and their TDO (gen_tdo).
module dcfeb_jtag_dummy
  import odmb_pkg::*;
#(
  parameter int unsigned IR_LEN = 10,
  parameter int unsigned DR_LEN = 16
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              tck,
  input  logic              tms,
  input  logic              tdi,
  output logic              tdo,
  output logic [IR_LEN-1:0] ir,        // current instruction
  output logic [DR_LEN-1:0] user_reg,  // last value loaded at Update-DR
  output tap_state_t        state
);
  logic              tck_q, tck_rise, tck_fall;
  logic [IR_LEN-1:0] ir_sr;
  logic [DR_LEN-1:0] dr_sr;
  logic              bypass_sr, bypass;

  assign tck_rise = tck & ~tck_q;
  assign tck_fall = ~tck & tck_q;
  assign bypass   = &ir;

  jtag_tap u_tap (.clk(clk), .rst(rst), .tck_rise(tck_rise), .tms(tms), .state(state));

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      tck_q     <= 1'b0;
      ir_sr     <= '0;
      dr_sr     <= '0;
      bypass_sr <= 1'b0;
      ir        <= '0;
      user_reg  <= '0;
      tdo       <= 1'b0;
    end else begin
      tck_q <= tck;
      if (tck_rise) begin
        unique case (state)
          TAP_RESET:      ir <= '0;
          TAP_CAPTURE_IR: ir_sr <= IR_LEN'(1);
          TAP_SHIFT_IR:   ir_sr <= {tdi, ir_sr[IR_LEN-1:1]};
          TAP_UPDATE_IR:  ir <= ir_sr;
          TAP_CAPTURE_DR: begin
            dr_sr     <= user_reg;
            bypass_sr <= 1'b0;
          end
          TAP_SHIFT_DR: begin
            dr_sr     <= {tdi, dr_sr[DR_LEN-1:1]};
            bypass_sr <= tdi;
          end
          TAP_UPDATE_DR:  if (!bypass) user_reg <= dr_sr;
          default: ;
        endcase
      end
      if (tck_fall) begin
        if (state == TAP_SHIFT_IR)      tdo <= ir_sr[0];
        else if (state == TAP_SHIFT_DR) tdo <= bypass ? bypass_sr : dr_sr[0];
      end
    end
  end
endmodule
