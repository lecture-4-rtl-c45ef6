// fdpe: D flip-flop with clock enable and asynchronous preset (Xilinx FDPE).
//
// Behaviour, from the primitive's truth table:
//   PRE = 1           -> Q = 1 at once, whatever the clock
//   PRE = 0, CE = 0   -> Q holds
//   PRE = 0, CE = 1   -> Q takes D on the rising edge of C
module fdpe (
  input  logic c,    // clock
  input  logic ce,   // clock enable
  input  logic pre,  // asynchronous preset, active high
  input  logic d,
  output logic q
);
  always_ff @(posedge c or posedge pre) begin
    if (pre)     q <= 1'b1;
    else if (ce) q <= d;
  end
endmodule
