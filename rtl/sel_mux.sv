// sel_mux: two-input selector. In the ODMB it picks, per source, between a
// real board and the on-chip dummy that imitates it: real or dummy DCFEB
// data (VME instruction 3300), external or internal triggers (3304), and the
// TDO of a real DCFEB or of its dummy. sel = 0 chooses in0 (real/external),
// sel = 1 chooses in1 (dummy/internal). Purely combinational.
module sel_mux #(
  parameter int unsigned WIDTH = 1
) (
  input  logic             sel,
  input  logic [WIDTH-1:0] in0,
  input  logic [WIDTH-1:0] in1,
  output logic [WIDTH-1:0] out
);
  always_comb out = sel ? in1 : in0;
endmodule
