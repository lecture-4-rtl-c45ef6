// bad_dcfeb_pulse: turns per-DCFEB link errors into a short pulse for the
// 40 MHz logic and a long pulse that resets that DCFEB's FIFOs.
//
// For each of NFEB DCFEBs, in the 160 MHz domain:
//   pulse160 = (long_packet AND NOT kill)
//            OR (rising edge of fiber error AND NOT kill)   -- the fiber term
//                                                            is left out when
//                                                            IS_SIMULATION = 1
// The fiber error is registered twice at 160 MHz and its rising edge is taken
// from the two copies (q AND NOT qq). pulse160 then feeds a pulse2slow into
// clk40 (bad_pulse, one clk40 cycle) and an npulse2same at 160 MHz that holds
// bad_pulse_long for LONG_PULSE cycles (50 in the ODMB). A killed (disabled)
// DCFEB never raises either pulse. All of this follows the ODMB firmware; the
// registering of the fiber error is this design's reading of its _q/_qq names.
module bad_dcfeb_pulse #(
  parameter int unsigned NFEB          = 7,
  parameter bit          IS_SIMULATION = 1'b0,
  parameter int unsigned LONG_PULSE    = 50
) (
  input  logic            clk160,
  input  logic            clk40,
  input  logic            reset,
  input  logic [NFEB-1:0] long_packet,    // clk160: packet too long
  input  logic [NFEB-1:0] fiber_err,      // clk160: fiber (link) error level
  input  logic [NFEB-1:0] kill,           // DCFEB disabled
  output logic [NFEB-1:0] pulse160,       // clk160: combined error pulse
  output logic [NFEB-1:0] bad_pulse,      // clk40: one-cycle error pulse
  output logic [NFEB-1:0] bad_pulse_long  // clk160: LONG_PULSE-cycle FIFO reset
);
  logic [NFEB-1:0] fiber_q, fiber_qq;
  logic [NFEB-1:0] pulse_longpacket, pulse_fiber;

  always_ff @(posedge clk160 or posedge reset) begin
    if (reset) begin
      fiber_q  <= '0;
      fiber_qq <= '0;
    end else begin
      fiber_q  <= fiber_err;
      fiber_qq <= fiber_q;
    end
  end

  assign pulse_longpacket = long_packet & ~kill;
  assign pulse_fiber      = fiber_q & ~fiber_qq & ~kill;
  assign pulse160         = IS_SIMULATION ? pulse_longpacket
                                          : (pulse_longpacket | pulse_fiber);

  for (genvar dev = 0; dev < NFEB; dev++) begin : g_feb
    pulse2slow u_pulse (
      .clk_din(clk160), .clk_dout(clk40), .rst(reset),
      .din(pulse160[dev]), .dout(bad_pulse[dev])
    );
    npulse2same #(.CNT_W(16)) u_long (
      .clk_dout(clk160), .rst(reset), .npulse(16'(LONG_PULSE)),
      .din(pulse160[dev]), .dout(bad_pulse_long[dev])
    );
  end
endmodule
