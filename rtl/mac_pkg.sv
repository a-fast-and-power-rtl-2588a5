// mac_pkg: shared widths and types of the Booth multiplier-accumulator.
//
// The MAC multiplies a 16-bit multiplicand X by a 16-bit multiplier Y and
// adds a 40-bit accumulator, the 16x16+40 configuration of the design.
// Operands are extended by one bit so that the same datapath serves signed
// (two's complement) and unsigned operands. The multiplier is recoded into
// radix-4 modified Booth digits; each digit is carried as a one-hot select
// (one = +-X, two = +-2X) plus a negate flag. The number of Booth rows
// (8) follows from the 16-bit multiplier; the ninth row used only in
// unsigned mode is a shifted copy of X.
package mac_pkg;
  timeunit 1ns;
  timeprecision 1ps;

  localparam int unsigned XW     = 16;        // multiplicand width
  localparam int unsigned YW     = 16;        // multiplier width
  localparam int unsigned AW     = 40;        // accumulator / result width
  localparam int unsigned XEW    = XW + 1;    // multiplicand with sign/zero extension bit
  localparam int unsigned PPW    = XEW + 1;   // one Booth row before alignment (room for 2X)
  localparam int unsigned NBOOTH = YW / 2;    // radix-4 Booth rows
  // Rows entering the Wallace tree: Booth rows, the add-term row (the +1s of
  // negated rows), the unsigned-mode shift term and the accumulator.
  localparam int unsigned NROWS  = NBOOTH + 3;
  localparam int unsigned MCBA_W = 8;         // bits per self-timed MCBA stage

  // Controls of one modified Booth digit (digit value = (neg ? -1 : +1) * (one ? 1 : two ? 2 : 0)).
  typedef struct packed {
    logic neg;
    logic one;
    logic two;
  } booth_sel_t;

  typedef logic [AW-1:0] row_t;
endpackage
