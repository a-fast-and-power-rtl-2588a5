// mbe_decoder_tb: checks one Booth partial-product row.
// For random extended multiplicands and every legal digit (-2..2) the row
// plus its add term (neg) must equal digit * xe modulo 2^PPW, where xe is
// read as a signed XEW-bit number.
module mbe_decoder_tb;
  import mac_pkg::*;
  timeunit 1ns;
  timeprecision 1ps;

  logic [XEW-1:0] xe;
  booth_sel_t     sel;
  logic [PPW-1:0] pp;
  int checks = 0, failures = 0;

  mbe_decoder dut (.xe, .sel, .pp);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 400; i++) begin
      xe = XEW'($urandom);
      if (i < 5) xe = (i == 0) ? '0 : (i == 1) ? {1'b1, {(XEW-1){1'b0}}} : (i == 2) ? '1 : XEW'(i);
      for (int dg = -2; dg <= 2; dg++) begin
        logic [PPW-1:0] want, got;
        longint xs;
        sel.neg = dg < 0;
        sel.one = (dg == 1 || dg == -1);
        sel.two = (dg == 2 || dg == -2);
        #1;
        xs   = longint'($signed(xe));
        want = PPW'(xs * dg);
        got  = pp + PPW'(sel.neg);
        checks++;
        if (got != want) begin
          failures++;
          $display("FAIL xe=%h digit=%0d pp=%h want=%h", xe, dg, pp, want);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
