// pulse2fast: one-clock-cycle pulse in a faster (or equal) clock domain for
// each rising edge of a level signal from another domain.
//
// DIN passes a two-flop synchroniser in CLK_DOUT; a third flop keeps the
// previous synchronised value, and DOUT = sync AND NOT previous. DOUT is high
// for exactly one CLK_DOUT cycle, starting two rising edges after DIN rises
// (three if DIN rises just after an edge). The source must hold DIN high for
// longer than one CLK_DOUT period. All flops clear on RST.
module pulse2fast (
  input  logic clk_dout,
  input  logic rst,
  input  logic din,
  output logic dout
);
  logic pulse0, pulse1, pulse2;

  fdce u_fd0 (.c(clk_dout), .ce(1'b1), .clr(rst), .d(din),    .q(pulse0));
  fdce u_fd1 (.c(clk_dout), .ce(1'b1), .clr(rst), .d(pulse0), .q(pulse1));
  fdce u_fd2 (.c(clk_dout), .ce(1'b1), .clr(rst), .d(pulse1), .q(pulse2));

  assign dout = pulse1 & ~pulse2;
endmodule
