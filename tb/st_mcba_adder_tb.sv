// st_mcba_adder_tb: checks the 40-bit self-timed MCBA adder.
// clkb_in is driven like the MAC's CLKB (low half: precharge, high half:
// evaluate, period 6.67 ns). Operands change during precharge. Checks:
//  - the stage clocks rise in order, stage k at (2k+1) FA delays after
//    clkb_in, and clkb_out at 2*NST FA delays;
//  - while precharging, every stage gives s = a ^ b (carries at 0);
//  - after the last stage has evaluated, {cout, s} = a + b + cin;
//  - carries do cross stage boundaries (counted; a failure if never).
module st_mcba_adder_tb;
  import mac_pkg::*;
  timeunit 1ns;
  timeprecision 1ps;

  localparam int  W   = 40;
  localparam int  NST = W / 8;
  localparam real D   = 0.2;

  logic clkb_in = 0, cin, cout, clkb_out;
  logic [W-1:0] a, b, s;
  logic [NST-1:0] stage_clkb;
  int checks = 0, failures = 0;
  int n_cross = 0;

  st_mcba_adder #(.W(W), .DELAY(D)) dut (.clkb_in, .a, .b, .cin, .s, .cout, .stage_clkb, .clkb_out);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a = '0; b = '0; cin = 0;
    #3.33;
    for (int i = 0; i < 1000; i++) begin
      logic [W:0] want;
      // precharge half: new operands
      a = {8'($urandom), 32'($urandom)};
      b = {8'($urandom), 32'($urandom)};
      cin = 1'($urandom);
      if (i % 7 == 0) b = ~a;             // long carry through every stage
      #0.5;
      checks++;
      if (s != (a ^ b) || stage_clkb != '0) begin
        failures++;
        $display("FAIL precharge s=%h stage_clkb=%b", s, stage_clkb);
      end
      #2.83;
      clkb_in = 1;
      // stage k rises at (2k+1)*D
      for (int k = 0; k < NST; k++) begin
        #(D - 0.05);
        checks++;
        if (stage_clkb[k] !== 1'b0) begin failures++; $display("FAIL stage %0d early", k); end
        #0.1;
        checks++;
        if (stage_clkb[k] !== 1'b1) begin failures++; $display("FAIL stage %0d late", k); end
        #(D - 0.05);
      end
      checks++;
      if (clkb_out !== 1'b1) begin failures++; $display("FAIL clkb_out not out after %0d delays", 2*NST); end
      #0.5;
      want = (W+1)'(a) + (W+1)'(b) + (W+1)'(cin);
      checks++;
      if ({cout, s} != want) begin
        failures++;
        $display("FAIL a=%h b=%h cin=%b got=%h want=%h", a, b, cin, {cout, s}, want);
      end
      for (int k = 1; k < NST; k++) if (dut.carry[k]) n_cross++;
      #(3.33 - 0.5 - 2.0*NST*D);
      clkb_in = 0;
      #(2.0*NST*D);
    end
    checks++;
    if (n_cross == 0) begin failures++; $display("FAIL no carry crossed a stage"); end
    $display("inter-stage carries: %0d", n_cross);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
