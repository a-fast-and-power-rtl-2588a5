// booth_mac_tb: end-to-end test of the Booth multiplier-accumulator at its
// default configuration (150 MHz clock, 6.667 ns period).
// Operands are driven at the falling edge. A cycle-accurate reference model
// (input register, then macpp <= X*Y + (clr ? 0 : macpp) modulo 2^40) is
// advanced at every rising edge and macpp is compared with it after each
// edge, which also checks the one-cycle latency from the input register to
// macpp. Phases: a directed latency check, random signed/unsigned
// operations with random clears, and a long accumulation of the largest
// signed product that overflows the 40-bit accumulator.
// Mechanisms counted (each must occur at least once): signed mode,
// unsigned mode, accumulate, clear, negated Booth rows, the unsigned shift
// term, MCBA bypass terms, carries crossing MCBA stages, 40-bit wrap-around,
// and adder_done high at the capture edge.
module booth_mac_tb;
  import mac_pkg::*;
  timeunit 1ns;
  timeprecision 1ps;

  localparam real HALF = 3.3335;

  logic clk = 0, rst_n = 0;
  logic [XW-1:0] x;
  logic [YW-1:0] y;
  logic tc, acc_clr;
  logic [AW-1:0] macpp;
  logic adder_done;
  int checks = 0, failures = 0;

  booth_mac dut (.clk, .rst_n, .x, .y, .tc, .acc_clr, .macpp, .adder_done);

  always #(HALF) clk = ~clk;

  // reference model
  logic [XW-1:0] m_x;  logic [YW-1:0] m_y;  logic m_tc, m_clr;
  logic [AW-1:0] m_acc;

  // mechanism counters
  typedef enum int {M_SIGNED, M_UNSIGNED, M_ACC, M_CLR, M_NEG, M_SHIFT,
                    M_BYPASS, M_XSTAGE, M_WRAP, M_DONE, M_N} mech_e;
  int mech [M_N];
  string mech_name [M_N] = '{"signed mode", "unsigned mode", "accumulate", "clear",
                             "negated Booth row", "unsigned shift term", "MCBA bypass H/I/J",
                             "carry across MCBA stages", "40-bit wrap-around",
                             "adder_done at capture edge"};

  function automatic logic [AW-1:0] prod(input logic [XW-1:0] a, input logic [YW-1:0] b,
                                         input logic t);
    if (t) return AW'(longint'($signed(a)) * longint'($signed(b)));
    else   return AW'(longint'(a) * longint'(b));
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // advance the model and sample the mechanisms at each capture edge
  always @(posedge clk) if (rst_n) begin
    logic [AW-1:0] p, addend;
    longint ssum;
    p = prod(m_x, m_y, m_tc);
    addend = m_clr ? '0 : m_acc;
    ssum = longint'($signed(addend)) + (m_tc ? longint'($signed(p)) : longint'(p));
    if (ssum >= (64'sd1 <<< (AW-1)) || ssum < -(64'sd1 <<< (AW-1))) mech[M_WRAP]++;
    if (m_tc) mech[M_SIGNED]++; else mech[M_UNSIGNED]++;
    if (m_clr) mech[M_CLR]++; else mech[M_ACC]++;
    if (!m_tc && m_y[YW-1]) mech[M_SHIFT]++;
    if (dut.u_ppgen.rows[NBOOTH][2*NBOOTH-2:0] != '0) mech[M_NEG]++;
    if (dut.u_adder.g_stage[0].u_mcba.h | dut.u_adder.g_stage[1].u_mcba.i_byp |
        dut.u_adder.g_stage[2].u_mcba.j  | dut.u_adder.g_stage[3].u_mcba.h) mech[M_BYPASS]++;
    if (dut.u_adder.carry[1] | dut.u_adder.carry[2] | dut.u_adder.carry[3] | dut.u_adder.carry[4])
      mech[M_XSTAGE]++;
    if (adder_done) mech[M_DONE]++;
    else begin failures++; $display("FAIL adder_done low at capture edge"); end
    m_acc <= addend + p;
    m_x <= x; m_y <= y; m_tc <= tc; m_clr <= acc_clr;
  end

  always @(posedge clk) if (rst_n) begin
    #0.5;
    checks++;
    if (macpp != m_acc) begin
      failures++;
      $display("FAIL t=%t macpp=%h model=%h", $realtime, macpp, m_acc);
    end
  end

  task automatic drive(input logic [XW-1:0] a, input logic [YW-1:0] b, input logic t,
                       input logic c);
    @(negedge clk);
    x = a; y = b; tc = t; acc_clr = c;
  endtask

  initial begin
    x = '0; y = '0; tc = 1; acc_clr = 1;
    m_x = '0; m_y = '0; m_tc = 1; m_clr = 1; m_acc = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;

    // directed latency check: -3 * 7 presented before edge t is on macpp after t+1
    drive(16'hFFFD, 16'd7, 1, 1);
    @(posedge clk); #0.6;
    checks++;
    if (macpp == AW'(-21)) begin failures++; $display("FAIL result one cycle early"); end
    @(posedge clk); #0.6;
    checks++;
    if (macpp != AW'(-21)) begin failures++; $display("FAIL latency: macpp=%h", macpp); end

    // random operations
    for (int i = 0; i < 4000; i++)
      drive(XW'($urandom), YW'($urandom), 1'($urandom), ($urandom % 8) == 0);

    // accumulate (-2^15)*(-2^15) = 2^30 until the signed 40-bit range overflows
    drive(16'h8000, 16'h8000, 1, 1);
    for (int i = 0; i < 600; i++) drive(16'h8000, 16'h8000, 1, 0);
    // unsigned maximum products
    for (int i = 0; i < 20; i++) drive(16'hFFFF, 16'hFFFF, 0, 0);
    drive(16'd0, 16'd0, 1, 1);
    repeat (3) @(posedge clk);
    #1;

    for (int m = 0; m < M_N; m++) begin
      $display("%-28s %0d", mech_name[m], mech[m]);
      checks++;
      if (mech[m] == 0) begin failures++; $display("FAIL mechanism never exercised: %s", mech_name[m]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
