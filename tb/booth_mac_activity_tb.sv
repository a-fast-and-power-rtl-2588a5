// booth_mac_activity_tb: the MAC under the power-measurement input pattern.
// The reference power figure of this MAC was taken at 150 MHz with input
// operands whose bits toggle with a probability of 25.78% per cycle. This
// testbench generates such a stream for X and Y (signed mode, accumulating,
// with a clear every 256 cycles), checks every macpp value against a
// reference model, and checks that the generated transition probability is
// within 24%..28%. It prints the measured toggle rates of the inputs and of
// macpp, a proxy for switching activity.
module booth_mac_activity_tb;
  import mac_pkg::*;
  timeunit 1ns;
  timeprecision 1ps;

  localparam real HALF    = 3.3335;   // 150 MHz
  localparam int  NCYC    = 5000;
  localparam int  P_TOG   = 2578;     // toggle probability, in units of 0.01 %

  logic clk = 0, rst_n = 0;
  logic [XW-1:0] x = '0;
  logic [YW-1:0] y = '0;
  logic tc = 1, acc_clr = 1;
  logic [AW-1:0] macpp, prev_macpp, m_acc, m_next;
  logic adder_done;
  logic [XW-1:0] xm, ym;   // toggle masks of this cycle
  logic [XW-1:0] m_x; logic [YW-1:0] m_y; logic m_clr;
  int checks = 0, failures = 0;
  longint in_toggles = 0, out_toggles = 0;

  booth_mac dut (.clk, .rst_n, .x, .y, .tc, .acc_clr, .macpp, .adder_done);

  always #(HALF) clk = ~clk;

  initial begin
    repeat (NCYC + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real rate;
    m_x = '0; m_y = '0; m_clr = 1; m_acc = '0; prev_macpp = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int c = 0; c < NCYC; c++) begin
      @(negedge clk);
      for (int i = 0; i < XW; i++) xm[i] = ($urandom % 10000) < P_TOG;
      for (int i = 0; i < YW; i++) ym[i] = ($urandom % 10000) < P_TOG;
      x = x ^ xm;
      y = y ^ ym;
      in_toggles += longint'($countones(xm)) + longint'($countones(ym));
      acc_clr = (c % 256) == 0;
      @(posedge clk);
      m_next = (m_clr ? '0 : m_acc) + AW'(longint'($signed(m_x)) * longint'($signed(m_y)));
      m_acc = m_next;
      m_x = x; m_y = y; m_clr = acc_clr;
      #0.5;
      checks++;
      if (macpp != m_acc) begin
        failures++;
        $display("FAIL cycle %0d macpp=%h model=%h", c, macpp, m_acc);
      end
      out_toggles += longint'($countones(macpp ^ prev_macpp));
      prev_macpp = macpp;
    end
    rate = real'(in_toggles) / real'(NCYC * (XW + YW));
    $display("input transition probability %0.4f, macpp toggles per bit per cycle %0.4f",
             rate, real'(out_toggles) / real'(NCYC * AW));
    checks++;
    if (rate < 0.24 || rate > 0.28) begin failures++; $display("FAIL transition probability off target"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
