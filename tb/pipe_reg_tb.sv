// pipe_reg_tb: checks the boundary register bank.
// Random words are loaded on successive rising edges and must appear on q
// exactly one edge later; an asynchronous reset between edges must clear q
// at once. Watchdog: 2000 cycles.
module pipe_reg_tb;
  timeunit 1ns;
  timeprecision 1ps;

  localparam int W = 24;
  logic clk = 0, rst_n = 1;
  logic [W-1:0] d, q, expect_q;
  int checks = 0, failures = 0;

  pipe_reg #(.W(W)) dut (.clk, .rst_n, .d, .q);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    d = '0;
    #1 rst_n = 0;
    #1;
    checks++;
    if (q != '0) begin failures++; $display("FAIL reset value %h", q); end
    @(negedge clk) rst_n = 1;
    for (int i = 0; i < 100; i++) begin
      d = W'($urandom);
      expect_q = d;
      @(posedge clk);
      #1;
      checks++;
      if (q != expect_q) begin failures++; $display("FAIL q=%h exp=%h", q, expect_q); end
      // q must hold until the next edge even if d changes
      d = ~d;
      #2;
      checks++;
      if (q != expect_q) begin failures++; $display("FAIL q changed between edges"); end
    end
    #1 rst_n = 0;
    #1;
    checks++;
    if (q != '0) begin failures++; $display("FAIL async reset, q=%h", q); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
