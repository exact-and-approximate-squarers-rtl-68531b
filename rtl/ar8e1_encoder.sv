// AR8E1: approximate Radix-8 Booth encoder without the x3 multiple.
//
// Digits of magnitude 3 are recoded so that the x3 multiple (an adder per bit)
// is never selected: '0101' -> +2, '0110' -> +4, '1001' -> -4, '1010' -> -2.
// The error of one digit is therefore -1 or +1 with a mean of zero over the four
// codes; all other codes are exact. In terms of the exact selects, a magnitude-3
// digit goes to m2 when a[3i] != a[3i+1] and to m4 otherwise. m3 is always 0;
// it is kept in the select struct so all encoders share one interface.
// The negate flag is the exact one. Purely combinational.
module ar8e1_encoder
  import r8sq_pkg::*;
(
  input  logic [3:0]  q,    // {a[3i+2], a[3i+1], a[3i], a[3i-1]}
  output booth_sel_t  sel
);
  logic xa, xb, xc;
  logic three;

  always_comb begin
    xa    = q[0] ^ q[1];
    xb    = q[1] ^ q[2];
    xc    = q[2] ^ q[3];
    three = xa & xc;
    sel.m1  = xa & ~xc;
    sel.m2  = (~xa & xb) | (three & xb);
    sel.m3  = 1'b0;
    sel.m4  = (~xa & ~xb & xc) | (three & ~xb);
    sel.neg = q[3] & ~(q[2] & q[1] & q[0]);
  end
endmodule
