// tb_dcfeb_pin_buf: a board ID whose top hex digit is 2 (ODMB.V2) turns the
// TMS/TDI drivers off and reads the pins; any other ID drives them and reads
// back the driven value.
module tb_dcfeb_pin_buf;
  logic [15:0] odmb_id;
  logic tms_out, tdi_out, tms_pad_in, tdi_pad_in;
  logic tms_pad_out, tdi_pad_out, pad_oe, odmb_tms, odmb_tdi, is_v2;
  int checks = 0, failures = 0;
  dcfeb_pin_buf dut (.odmb_id(odmb_id), .tms_out(tms_out), .tdi_out(tdi_out),
    .tms_pad_in(tms_pad_in), .tdi_pad_in(tdi_pad_in), .tms_pad_out(tms_pad_out),
    .tdi_pad_out(tdi_pad_out), .pad_oe(pad_oe), .odmb_tms(odmb_tms), .odmb_tdi(odmb_tdi),
    .is_odmb_v2(is_v2));
  initial begin
    #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    logic v2;
    for (int ver = 0; ver < 16; ver++) begin
      repeat (16) begin
        odmb_id = {4'(ver), 12'($urandom)};
        {tms_out, tdi_out, tms_pad_in, tdi_pad_in} = 4'($urandom);
        #1;
        v2 = (ver == 2);
        checks += 5;
        if (is_v2 !== v2) begin failures++; $display("FAIL is_odmb_v2 id=%h", odmb_id); end
        if (pad_oe !== !v2) begin failures++; $display("FAIL pad_oe id=%h", odmb_id); end
        if (odmb_tms !== (v2 ? tms_pad_in : tms_out)) begin failures++; $display("FAIL odmb_tms id=%h", odmb_id); end
        if (odmb_tdi !== (v2 ? tdi_pad_in : tdi_out)) begin failures++; $display("FAIL odmb_tdi id=%h", odmb_id); end
        if ({tms_pad_out, tdi_pad_out} !== {tms_out, tdi_out}) begin failures++; $display("FAIL pad out"); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
