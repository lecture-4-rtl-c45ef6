// tb_dcfeb_jtag_dummy: drives TCK/TMS/TDI by hand through the TAP state
// diagram: loads an instruction (checking the captured ...01 pattern), writes
// the user register and reads it back in the next scan, and checks that the
// all-ones instruction gives the one-bit bypass.
module tb_dcfeb_jtag_dummy;
  import odmb_pkg::*;
  localparam int IR_LEN = 10, DR_LEN = 16;
  logic clk = 0, rst, tck, tms, tdi, tdo;
  logic [IR_LEN-1:0] ir;
  logic [DR_LEN-1:0] user_reg;
  tap_state_t state;
  int checks = 0, failures = 0;
  dcfeb_jtag_dummy #(.IR_LEN(IR_LEN), .DR_LEN(DR_LEN)) dut (.clk(clk), .rst(rst), .tck(tck),
    .tms(tms), .tdi(tdi), .tdo(tdo), .ir(ir), .user_reg(user_reg), .state(state));
  always #5 clk = ~clk;

  // one TCK period of four clk cycles; returns TDO as seen at the rising edge
  task automatic tck_cycle(input logic t_ms, input logic t_di, output logic t_do);
    @(negedge clk); tck = 0; tms = t_ms; tdi = t_di;
    repeat (2) @(negedge clk);
    t_do = tdo; tck = 1;
    repeat (2) @(negedge clk);
  endtask
  task automatic scan(input bit is_ir, input int n, input logic [31:0] din, output logic [31:0] dout);
    logic b;
    dout = '0;
    tck_cycle(1, 0, b);                 // Idle -> Select-DR
    if (is_ir) tck_cycle(1, 0, b);      // -> Select-IR
    tck_cycle(0, 0, b);                 // -> Capture
    tck_cycle(0, 0, b);                 // -> Shift
    for (int i = 0; i < n; i++) begin
      tck_cycle(i == n - 1, din[i], b); // last bit -> Exit1
      dout[i] = b;
    end
    tck_cycle(1, 0, b);                 // -> Update
    tck_cycle(0, 0, b);                 // -> Idle
  endtask
  task automatic chk(input logic [31:0] got, input logic [31:0] exp, input string what);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %h expected %h", what, got, exp); end
  endtask

  initial begin
    #2000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    logic b;
    logic [31:0] r, v;
    rst = 1; tck = 0; tms = 1; tdi = 0; #22; rst = 0;
    repeat (5) tck_cycle(1, 0, b);
    chk(32'(state), 32'(TAP_RESET), "test-logic-reset");
    tck_cycle(0, 0, b);
    chk(32'(state), 32'(TAP_IDLE), "run-test/idle");
    scan(1, IR_LEN, 32'h155, r);
    chk(r, 32'h1, "IR capture pattern");
    chk(32'(ir), 32'h155, "IR loaded");
    chk(32'(state), 32'(TAP_IDLE), "back to idle after IR scan");
    scan(0, DR_LEN, 32'hA5C3, r);
    chk(r, 32'h0, "user register initial value");
    chk(32'(user_reg), 32'hA5C3, "user register written");
    v = 32'hA5C3;
    for (int k = 0; k < 8; k++) begin
      logic [31:0] prev;
      prev = v;
      v = 32'($urandom_range(0, 65535));
      scan(0, DR_LEN, v, r);
      chk(r, prev, "previous value read back");
      chk(32'(user_reg), v, "user register written (random)");
    end
    // readback of the last random value
    scan(0, DR_LEN, 32'h0, r);
    chk(r, v, "last value read back");
    // bypass: all-ones instruction, TDO is TDI one bit later, first bit 0
    scan(1, IR_LEN, 32'h3FF, r);
    chk(32'(ir), 32'h3FF, "bypass instruction");
    v = 32'($urandom) & 32'hFFFF;
    scan(0, DR_LEN, v, r);
    chk(r, {v[30:0], 1'b0} & 32'hFFFF, "bypass delays TDI by one bit");
    chk(32'(user_reg), 32'h0, "bypass leaves user register");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
