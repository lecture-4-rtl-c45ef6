// pulse2slow: carries a pulse from one clock domain into any other, slower,
// faster or equal.
//
// A toggle flop in CLK_DIN inverts its state for every cycle DIN is high, so
// the pulse becomes a level change that cannot be missed. The toggle passes a
// two-flop synchroniser in CLK_DOUT, and a third flop keeps its previous
// value; DOUT = sync XOR previous is a one-cycle pulse in CLK_DOUT per input
// pulse, two to three CLK_DOUT edges after it. Input pulses must be at least
// two CLK_DOUT periods apart, or two toggles cancel. All flops clear on RST.
module pulse2slow (
  input  logic clk_din,
  input  logic clk_dout,
  input  logic rst,
  input  logic din,
  output logic dout
);
  logic toggle_d, toggle_q;
  logic pulse2, pulse3, pulse4;

  assign toggle_d = din ? ~toggle_q : toggle_q;

  fdce u_fd1 (.c(clk_din),  .ce(1'b1), .clr(rst), .d(toggle_d), .q(toggle_q));
  fdce u_fd2 (.c(clk_dout), .ce(1'b1), .clr(rst), .d(toggle_q), .q(pulse2));
  fdce u_fd3 (.c(clk_dout), .ce(1'b1), .clr(rst), .d(pulse2),   .q(pulse3));
  fdce u_fd4 (.c(clk_dout), .ce(1'b1), .clr(rst), .d(pulse3),   .q(pulse4));

  assign dout = pulse3 ^ pulse4;
endmodule
