// wallace_tree_tb: checks the carry-save reduction.
// Random 40-bit rows (also all-ones rows, the worst case for carries) are
// applied; sum + carry must equal the sum of all input rows modulo 2^40.
module wallace_tree_tb;
  import mac_pkg::*;
  timeunit 1ns;
  timeprecision 1ps;

  logic [NROWS-1:0][AW-1:0] rows;
  logic [AW-1:0] sum, carry;
  int checks = 0, failures = 0;

  wallace_tree dut (.rows, .sum, .carry);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 2000; i++) begin
      logic [AW-1:0] want;
      for (int r = 0; r < NROWS; r++)
        rows[r] = (i < 3) ? (i == 0 ? '1 : i == 1 ? '0 : AW'(1) << r)
                          : {AW'($urandom), AW'($urandom)} >> ($urandom % 20);
      #1;
      want = '0;
      for (int r = 0; r < NROWS; r++) want += rows[r];
      checks++;
      if (AW'(sum + carry) != want) begin
        failures++;
        $display("FAIL sum+carry=%h want=%h", AW'(sum + carry), want);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
