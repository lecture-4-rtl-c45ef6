// npulse2same: stretches a pulse to NPULSE cycles in the same clock domain.
//
// Each cycle DIN is high loads a down-counter with NPULSE; DOUT is high while
// the counter is not zero. DOUT therefore rises on the edge that samples DIN
// and stays high for NPULSE cycles after the last cycle DIN was high (a new
// pulse restarts the count). NPULSE = 0 gives no output. The ODMB uses it with
// NPULSE = 50 at 160 MHz to hold FIFO resets long enough. The counter scheme
// is this design's own; only the function is from the ODMB firmware.
module npulse2same #(
  parameter int unsigned CNT_W = 16  // width of NPULSE and of the counter
) (
  input  logic             clk_dout,
  input  logic             rst,      // asynchronous clear
  input  logic [CNT_W-1:0] npulse,   // length of the output pulse in cycles
  input  logic             din,
  output logic             dout
);
  logic [CNT_W-1:0] cnt;

  always_ff @(posedge clk_dout or posedge rst) begin
    if (rst)             cnt <= '0;
    else if (din)        cnt <= npulse;
    else if (cnt != '0)  cnt <= cnt - 1'b1;
  end

  assign dout = (cnt != '0);
endmodule
