// booth_pp_gen_tb: checks that the partial-product rows add up to the product.
// Random and corner operands in signed and unsigned mode; the 40-bit sum of
// all rows must equal X*Y computed directly (signed or unsigned), each
// Booth row i must be confined to bits 2i..2i+17 (no sign extension), and the
// unsigned shift-term row must be non-zero exactly when tc = 0 and y[15] = 1.
module booth_pp_gen_tb;
  import mac_pkg::*;
  timeunit 1ns;
  timeprecision 1ps;

  logic [XW-1:0] x;
  logic [YW-1:0] y;
  logic          tc;
  logic [NBOOTH+1:0][AW-1:0] rows;
  int checks = 0, failures = 0;

  booth_pp_gen dut (.x, .y, .tc, .rows);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 3000; i++) begin
      logic [AW-1:0] sum, want;
      x  = XW'($urandom);
      y  = YW'($urandom);
      tc = 1'($urandom);
      if (i < 16) begin
        x = (i & 1) ? 16'h8000 : (i & 2) ? 16'hFFFF : 16'h7FFF;
        y = (i & 4) ? 16'h8000 : (i & 8) ? 16'hFFFF : 16'h0001;
        tc = i[0] ^ i[3];
      end
      #1;
      sum = '0;
      for (int r = 0; r < NBOOTH + 2; r++) sum += rows[r];
      if (tc) want = AW'(longint'($signed(x)) * longint'($signed(y)));
      else    want = AW'(longint'(x) * longint'(y));
      checks++;
      if (sum != want) begin
        failures++;
        $display("FAIL tc=%b x=%h y=%h sum=%h want=%h", tc, x, y, sum, want);
      end
      // a Booth row occupies only its own 18 bits; the cells above are empty
      for (int r = 0; r < NBOOTH; r++) begin
        checks++;
        if ((rows[r] >> (PPW + 2*r)) != '0) begin
          failures++;
          $display("FAIL row %0d extends above bit %0d: %h", r, PPW + 2*r - 1, rows[r]);
        end
      end
      checks++;
      if ((rows[NBOOTH+1] != '0) != (!tc && y[YW-1] && x != '0)) begin
        failures++;
        $display("FAIL shift term tc=%b y=%h row=%h", tc, y, rows[NBOOTH+1]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
