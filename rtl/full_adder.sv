// full_adder: 1-bit full adder cell in mirror-adder form.
//
// All 1-bit adders of the MAC are static mirror adders. A mirror adder first
// forms the inverted carry, ~cout = ~maj(a,b,ci), and derives the sum from it:
// sum = a&b&ci | ~cout&(a|b|ci). The RTL keeps that two-step structure; the
// function is the ordinary full adder. Purely combinational.
module full_adder (
  input  logic a,
  input  logic b,
  input  logic ci,
  output logic s,
  output logic co
);
  timeunit 1ns;
  timeprecision 1ps;

  logic co_n;  // the mirror adder's internal inverted carry node

  always_comb begin
    co_n = ~((a & b) | (ci & (a | b)));
    s    = (a & b & ci) | (co_n & (a | b | ci));
    co   = ~co_n;
  end
endmodule
