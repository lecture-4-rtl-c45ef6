// crossclock: moves a level signal from one clock domain to another.
//
// Three flip-flops with asynchronous clear, and no logic between them: the
// first registers DIN in its own clock (CLK_DIN) so that only a clean flop
// output crosses; the next two, in CLK_DOUT, form the two-stage synchroniser
// that lets a metastable first stage settle. DOUT follows a change of the
// registered input after two rising edges of CLK_DOUT. All three flops are
// FDC cells (fdce with the enable tied high), as in the ODMB utilities.
module crossclock (
  input  logic clk_din,   // source clock
  input  logic clk_dout,  // destination clock
  input  logic rst,       // asynchronous clear of all three stages
  input  logic din,       // level in the source domain
  output logic dout       // the same level in the destination domain
);
  logic [1:0] level;

  fdce u_fd1 (.c(clk_din),  .ce(1'b1), .clr(rst), .d(din),      .q(level[0]));
  fdce u_fd2 (.c(clk_dout), .ce(1'b1), .clr(rst), .d(level[0]), .q(level[1]));
  fdce u_fd3 (.c(clk_dout), .ce(1'b1), .clr(rst), .d(level[1]), .q(dout));
endmodule
