// tb_cfebjtag: drives VME instructions straight into device 1 and watches the
// JTAG pins with an independent device model (its own TAP table and a 16-bit
// data register that captures a known value). Checks, for every instruction
// 1Y00/1Y04/1Y08/1Y0C/1Y1C: the exact TMS/TDI sequence at TCK rising edges,
// the TAP state reached, the bits read back on TDO, the TCK fan-out to the
// selected DCFEB only, and the number of clk cycles until DTACK. Reads and
// unknown instructions must not start a scan or raise DTACK.
module tb_cfebjtag;
  import odmb_pkg::*;
  localparam int NFEB = 7;
  logic clk = 0, rst;
  vme_cmd_t cmd;
  logic device;
  logic [NFEB-1:0] feb_sel, feb_tdo, feb_tck;
  logic tms, tdi, busy, dtack;
  logic [15:0] tdo_data;
  int checks = 0, failures = 0;

  cfebjtag #(.NFEB(NFEB)) dut (.clk(clk), .rst(rst), .cmd(cmd), .device(device),
    .feb_sel(feb_sel), .feb_tdo(feb_tdo), .feb_tck(feb_tck), .tms(tms), .tdi(tdi),
    .tdo_data(tdo_data), .busy(busy), .dtack(dtack));
  always #5 clk = ~clk;

  // ---- device model on the selected DCFEB ----
  int next0 [16] = '{1, 1, 3, 4, 4, 6, 6, 4, 1, 10, 11, 11, 13, 13, 11, 1};
  int next1 [16] = '{0, 2, 9, 5, 5, 8, 7, 8, 2, 0, 12, 12, 15, 14, 15, 2};
  int   mstate;               // model TAP state (codes as tap_state_t)
  logic [15:0] mdr, mcap;     // shift register and the value it captures
  logic [9:0]  mir;
  logic [15:0] mupdate;       // value at the last Update-DR
  logic [9:0]  mupdate_ir;
  int   sel;                  // index of the selected DCFEB
  logic tck_q;
  logic rec_tms [$];
  logic rec_tdi [$];
  int   other_tck;

  always @(posedge clk) begin
    tck_q <= feb_tck[sel];
    for (int i = 0; i < NFEB; i++) if (i != sel && feb_tck[i]) other_tck++;
  end
  // the model reacts to TCK edges (TCK is a registered output of clk)
  always @(posedge feb_tck[sel]) begin
    rec_tms.push_back(tms);
    rec_tdi.push_back(tdi);
    case (mstate)
      3:  mdr <= mcap;                    // Capture-DR
      4:  mdr <= {tdi, mdr[15:1]};        // Shift-DR
      8:  mupdate <= mdr;                 // Update-DR
      10: mir <= 10'b1;                   // Capture-IR
      11: mir <= {tdi, mir[9:1]};         // Shift-IR
      15: mupdate_ir <= mir;              // Update-IR
      default: ;
    endcase
    mstate <= tms ? next1[mstate] : next0[mstate];
  end
  always @(negedge feb_tck[sel]) begin
    if (mstate == 4)  feb_tdo[sel] <= mdr[0];
    if (mstate == 11) feb_tdo[sel] <= mir[0];
  end

  task automatic vme(input logic [15:0] instr, input logic rd, input logic [15:0] data,
                     output int cycles, output bit acked);
    @(negedge clk);
    cmd.command = instr[11:2]; cmd.writer = rd; cmd.indata = data; device = instr[12];
    rec_tms.delete(); rec_tdi.delete();
    cmd.strobe = 1;
    cycles = 0; acked = 0;
    while (!acked && cycles < 200) begin
      @(posedge clk); #1; cycles++;
      if (dtack) acked = 1;
    end
    @(negedge clk); cmd.strobe = 0;
    repeat (3) @(negedge clk);
  endtask
  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // expected TMS stream for an instruction
  task automatic expect_seq(input logic [7:0] low, input int n, input logic [15:0] data, input string what);
    logic exp_tms [$];
    logic exp_tdi [$];
    bit hdr, tail, ir;
    hdr = low[2]; tail = low[3]; ir = low[4];
    if (hdr) begin
      exp_tms.push_back(1); exp_tdi.push_back(0);
      if (ir) begin exp_tms.push_back(1); exp_tdi.push_back(0); end
      exp_tms.push_back(0); exp_tdi.push_back(0);
      exp_tms.push_back(0); exp_tdi.push_back(0);
    end
    for (int i = 0; i < n; i++) begin
      exp_tms.push_back(tail && i == n - 1); exp_tdi.push_back(data[i]);
    end
    if (tail) begin
      exp_tms.push_back(1); exp_tdi.push_back(0);
      exp_tms.push_back(0); exp_tdi.push_back(0);
    end
    chk(rec_tms.size() == exp_tms.size(), $sformatf("%s: %0d TCK pulses, expected %0d", what, rec_tms.size(), exp_tms.size()));
    if (rec_tms.size() == exp_tms.size())
      for (int i = 0; i < exp_tms.size(); i++) begin
        if (rec_tms[i] !== exp_tms[i] || (i >= (hdr ? (ir ? 4 : 3) : 0) && i < (hdr ? (ir ? 4 : 3) : 0) + n && rec_tdi[i] !== exp_tdi[i])) begin
          chk(0, $sformatf("%s: TCK %0d TMS/TDI %b%b expected %b%b", what, i, rec_tms[i], rec_tdi[i], exp_tms[i], exp_tdi[i]));
        end
      end
  endtask

  initial begin
    #3000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    int cyc, total;
    bit ack;
    logic [15:0] d;
    rst = 1; cmd = '0; cmd.writer = 1; device = 0; feb_tdo = '0; other_tck = 0;
    mstate = 0; mdr = '0; mir = '0; mupdate = '0; mupdate_ir = '0; sel = 3; feb_sel = 7'b0001000;
    mcap = 16'hC3A5;
    #22; rst = 0;
    // bring the model TAP to Run-Test/Idle: it starts in Test-Logic-Reset and
    // the first header leaves Idle, so step it once with a data-only shift
    mstate = 1;
    for (int y = 0; y < 16; y++) begin
      d = 16'($urandom);
      mcap = 16'($urandom);
      vme({4'h1, 4'(y), 8'h0C}, 0, d, cyc, ack);
      total = 3 + (y + 1) + 2;
      chk(ack, $sformatf("1%0h0C acknowledged", y));
      chk(cyc == 2 * total + 3, $sformatf("1%0h0C DTACK after %0d cycles, expected %0d", y, cyc, 2 * total + 3));
      expect_seq(8'h0C, y + 1, d, $sformatf("1%0h0C", y));
      chk(mstate == 1, $sformatf("1%0h0C ends in Run-Test/Idle (state %0d)", y, mstate));
      chk(tdo_data == (mcap & 16'((32'h1 << (y + 1)) - 1)), $sformatf("1%0h0C TDO %h", y, tdo_data));
      // the 16-bit register shifts right: the new bits end at the top
      chk(mupdate == 16'(({16'h0, mcap} >> (y + 1)) | ({16'h0, d} << (15 - y))),
          $sformatf("1%0h0C register updated with %h", y, mupdate));
    end
    // long scan in pieces: header-only, data-only, tailer-only
    mcap = 16'h5A0F;
    d = 16'h00B7;
    vme(16'h1304, 0, d, cyc, ack);   // Y = 3: four bits after the header
    chk(ack, "1304 acknowledged");
    expect_seq(8'h04, 4, d, "1304");
    chk(mstate == 4, "1304 leaves the TAP in Shift-DR");
    vme(16'h1300, 0, 16'h0009, cyc, ack);
    expect_seq(8'h00, 4, 16'h0009, "1300");
    chk(mstate == 4, "1300 stays in Shift-DR");
    vme(16'h1708, 0, 16'h00A1, cyc, ack);
    expect_seq(8'h08, 8, 16'h00A1, "1708");
    chk(mstate == 1, "1708 returns to Run-Test/Idle");
    chk(mupdate == 16'hA197, $sformatf("16-bit register from three writes %h", mupdate));
    // instruction register
    vme(16'h191C, 0, 16'h02AB, cyc, ack);
    expect_seq(8'h1C, 10, 16'h02AB, "191C");
    chk(mstate == 1, "191C ends in Run-Test/Idle");
    chk(mupdate_ir == 10'h2AB, $sformatf("IR loaded %h", mupdate_ir));
    chk(tdo_data == 16'h0001, $sformatf("IR capture read back %h", tdo_data));
    chk(cyc == 2 * (4 + 10 + 2) + 3, $sformatf("191C DTACK after %0d cycles", cyc));
    // reads, unknown codes and other devices do nothing
    vme(16'h1F0C, 1, 16'hFFFF, cyc, ack);
    chk(!ack && rec_tms.size() == 0, "read of 1F0C ignored");
    vme(16'h1F10, 0, 16'hFFFF, cyc, ack);
    chk(!ack && rec_tms.size() == 0, "unknown 1F10 ignored");
    vme(16'h0F0C, 0, 16'hFFFF, cyc, ack);
    chk(!ack && rec_tms.size() == 0, "other device ignored");
    chk(other_tck == 0, "TCK only on the selected DCFEB");
    chk(!busy, "idle at the end");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
