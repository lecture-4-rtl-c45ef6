// fdce: D flip-flop with clock enable and asynchronous clear, the basic
// storage element of the ODMB firmware (Xilinx FDCE).
//
// Behaviour, from the primitive's truth table:
//   CLR = 1           -> Q = 0 at once, whatever the clock
//   CLR = 0, CE = 0   -> Q holds
//   CLR = 0, CE = 1   -> Q takes D on the rising edge of C
// An FDC is this cell with CE tied high. The FPGA power-on value (INIT) is not
// modelled: the cell starts from CLR, which callers must pulse after power-up.
module fdce (
  input  logic c,    // clock
  input  logic ce,   // clock enable
  input  logic clr,  // asynchronous clear, active high
  input  logic d,
  output logic q
);
  always_ff @(posedge c or posedge clr) begin
    if (clr)     q <= 1'b0;
    else if (ce) q <= d;
  end
endmodule
