// jtag_tap: IEEE 1149.1 TAP controller state machine.
//
// Sixteen states; on every TCK rising edge the controller moves along the
// edge labelled with the current TMS value (see odmb_pkg::tap_next). Five
// TCK edges with TMS = 1 reach Test-Logic-Reset from any state. The block
// runs on a system clock and advances only in cycles where tck_rise is high,
// so a design that oversamples TCK can host it without a second clock.
// Reset (asynchronous) puts it in Test-Logic-Reset.
module jtag_tap
  import odmb_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic       tck_rise,  // one-cycle strobe: TCK rising edge
  input  logic       tms,
  output tap_state_t state
);
  always_ff @(posedge clk or posedge rst) begin
    if (rst)           state <= TAP_RESET;
    else if (tck_rise) state <= tap_next(state, tms);
  end
endmodule
