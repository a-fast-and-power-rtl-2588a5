// full_adder_tb: exhaustive check of the mirror full-adder cell.
// All eight input combinations are applied; sum and carry are compared with
// the arithmetic a+b+ci. A watchdog ends the run if it ever hangs.
module full_adder_tb;
  timeunit 1ns;
  timeprecision 1ps;

  logic a, b, ci, s, co;
  int checks = 0, failures = 0;

  full_adder dut (.a, .b, .ci, .s, .co);

  initial begin
    #1000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      {a, b, ci} = 3'(v);
      #1;
      checks++;
      if ({co, s} != 2'(a + b + ci)) begin
        failures++;
        $display("FAIL a=%b b=%b ci=%b -> co=%b s=%b", a, b, ci, co, s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
