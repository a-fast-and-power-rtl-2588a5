// mbe_encoder_tb: exhaustive check of the radix-4 Booth encoder.
// For each of the eight triplets the digit value -2*t2 + t1 + t0 is computed
// directly and compared with the value the select lines stand for; a zero
// digit must not raise neg, and one and two must never both be set.
module mbe_encoder_tb;
  import mac_pkg::*;
  timeunit 1ns;
  timeprecision 1ps;

  logic [2:0] trip;
  booth_sel_t sel;
  int checks = 0, failures = 0;

  mbe_encoder dut (.trip, .sel);

  initial begin
    #1000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      int digit, mag, got;
      trip = 3'(v);
      #1;
      digit = -2 * int'(trip[2]) + int'(trip[1]) + int'(trip[0]);
      mag   = sel.two ? 2 : (sel.one ? 1 : 0);
      got   = sel.neg ? -mag : mag;
      checks++;
      if (got != digit || (sel.one && sel.two) || (digit == 0 && sel.neg)) begin
        failures++;
        $display("FAIL trip=%b digit=%0d sel=%p", trip, digit, sel);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
