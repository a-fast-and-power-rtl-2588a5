// mcba8_tb: checks the 8-bit dynamic Manchester carry-bypass stage.
// For random and corner operands the stage is precharged (clkb = 0), where
// every carry output must be 0, and then evaluated (clkb = 1), where every
// carry C[i] and the sum must match a reference computed bit by bit from
// a + b + cin. It also checks the dynamic property the self-timed scheme
// relies on: from precharge to evaluation no carry output falls from 1 to 0.
// Counts how often each bypass term (H, I, J) decided carry 4.
module mcba8_tb;
  import mac_pkg::*;
  timeunit 1ns;
  timeprecision 1ps;

  logic clkb, cin;
  logic [7:0] a, b, s, c;
  int checks = 0, failures = 0;
  int n_bypass = 0;

  mcba8 dut (.clkb, .a, .b, .cin, .s, .c);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 3000; i++) begin
      logic [7:0] want_c, c_pre;
      logic [8:0] tot;
      a = 8'($urandom); b = 8'($urandom); cin = 1'($urandom);
      if (i < 4) begin a = 8'hFF; b = (i < 2) ? 8'h00 : 8'h01; cin = i[0]; end
      clkb = 0;
      #1;
      c_pre = c;
      checks++;
      if (c != '0 || s != (a ^ b)) begin
        failures++;
        $display("FAIL precharge c=%b s=%h", c, s);
      end
      clkb = 1;
      #1;
      for (int k = 0; k < 8; k++) begin
        logic [8:0] part, mask;
        mask = (9'd1 << (k + 1)) - 9'd1;
        part = (9'(a) & mask) + (9'(b) & mask) + 9'(cin);
        want_c[k] = part[k+1];
      end
      tot = 9'(a) + 9'(b) + 9'(cin);
      checks++;
      if (c != want_c || s != tot[7:0] || c[7] != tot[8]) begin
        failures++;
        $display("FAIL a=%h b=%h cin=%b c=%b want=%b s=%h", a, b, cin, c, want_c, s);
      end
      checks++;
      if ((c_pre & ~c) != '0) begin
        failures++;
        $display("FAIL carry fell during evaluation");
      end
      if (dut.h | dut.i_byp | dut.j) n_bypass++;
    end
    checks++;
    if (n_bypass == 0) begin failures++; $display("FAIL bypass never used"); end
    $display("bypass terms active in %0d evaluations", n_bypass);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
