// fa_delay_tb: checks the full-adder delay module.
// A clock edge on clk_in must reach clk_out with the configured delay: not
// yet visible just before DELAY, visible just after it, for rising and
// falling edges and for two delay settings.
module fa_delay_tb;
  timeunit 1ns;
  timeprecision 1ps;

  logic ci = 0, co_a, co_b;
  int checks = 0, failures = 0;

  fa_delay #(.DELAY(0.2)) dut_a (.clk_in(ci), .clk_out(co_a));
  fa_delay #(.DELAY(0.5)) dut_b (.clk_in(ci), .clk_out(co_b));

  task automatic check(input logic got, input logic want, input string what);
    checks++;
    if (got !== want) begin
      failures++;
      $display("FAIL %s: got %b want %b at %t", what, got, want, $realtime);
    end
  endtask

  initial begin
    #1000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #5;
    for (int i = 0; i < 10; i++) begin
      logic v;
      v = ~ci;
      ci = v;
      #0.15;
      check(co_a, ~v, "0.2 ns delay, before");
      check(co_b, ~v, "0.5 ns delay, before");
      #0.1;
      check(co_a, v, "0.2 ns delay, after");
      check(co_b, ~v, "0.5 ns delay, still before");
      #0.3;
      check(co_b, v, "0.5 ns delay, after");
      #4.45;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
